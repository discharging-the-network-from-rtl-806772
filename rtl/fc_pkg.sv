// fc_pkg: message formats shared by the proactive buffer-reservation fabric.
//
// The fabric moves fixed-size packets, one per link per packet time. In this
// RTL one packet time is one clock cycle and a whole packet (header plus a
// short payload tag) travels as one word, so every link is a single pkt_t
// with a valid bit. The header carries what the scheme needs: source and
// destination fabric ports, the B-switch route chosen by the per-flow
// distribution pointer, and a per-flow sequence number for re-sequencing at
// the egress. Field widths are fixed here for fabrics of up to 256 ports and
// 16 middle switches; modules check their own N and M against them.
// The control messages (requests, grants, hop-by-hop and end-to-end
// credits) are likewise single words with a valid bit.
package fc_pkg;

  localparam int unsigned PORT_W    = 8;   // fabric port id, N <= 256
  localparam int unsigned ROUTE_W   = 4;   // B-switch id, M <= 16
  localparam int unsigned SEQ_W     = 8;   // per-flow sequence number (modular)
  localparam int unsigned PAYLOAD_W = 16;  // payload tag carried for checking

  typedef logic [PORT_W-1:0]    port_t;
  typedef logic [ROUTE_W-1:0]   route_t;
  typedef logic [SEQ_W-1:0]     seq_t;
  typedef logic [PAYLOAD_W-1:0] payload_t;

  // One packet on a data link.
  typedef struct packed {
    logic     valid;
    port_t    src;
    port_t    dst;
    route_t   route;
    seq_t     seq;
    payload_t payload;
  } pkt_t;

  // Request from an ingress adapter: one credit for flow (adapter -> dst).
  typedef struct packed {
    logic  valid;
    port_t dst;
  } req_t;

  // Grant to an ingress adapter: one credit reserved for flow (adapter -> dst).
  typedef struct packed {
    logic  valid;
    port_t dst;
  } gnt_t;

  // Hop-by-hop credit: one crosspoint buffer slot freed in the downstream
  // crossbar; idx names the crosspoint along the upstream's line.
  typedef struct packed {
    logic   valid;
    route_t idx;
  } hcred_t;

  // End-to-end credit from egress adapter j to output arbiter j: the
  // C-stage crosspoint fed by B switch `route` has one more free slot.
  typedef struct packed {
    logic   valid;
    route_t route;
  } ecred_t;

  // Permuted visiting order of an output arbiter: position p of output j
  // maps to input (p * mult + add) mod n. mult is odd, so for a power-of-two
  // n this is a permutation; mult and add are a fixed hash of j.
  function automatic int unsigned perm_mult(input int unsigned j);
    int unsigned h;
    h = (j * 32'd2654435761) ^ 32'h5bd1e995;
    return ((h >> 7) | 32'd1);
  endfunction

  function automatic int unsigned perm_add(input int unsigned j);
    int unsigned h;
    h = (j * 32'd40503 + 32'd977) ^ 32'h68e31da4;
    return (h >> 3);
  endfunction

endpackage
