// coma_system: a bus-based COMA multiprocessor with relaxed snooping.
//
// N_NODES processor nodes share one global bus. Each node's memory is an
// attraction memory (AM): a large set-associative cache of the global address
// space with no home memory behind it, kept coherent by a four-state
// ownership protocol (INV, SHN, SHO, EXL). Because a read miss always ends in
// SHN and exactly one node owns every block, no node has to report sharing
// information while the bus waits. Each node therefore just queues the
// requests it snoops and works through them later at the pace of its slow
// state and tag memory; the bus only waits for a queue insertion, and a full
// queue answers NAK so the request is retried.
//
// This module holds the coherence side of every node (snoop_node) and the bus
// (global_bus). What lies outside is brought out as ports:
//   * the processors and their caches: per node, a bus request port
//     (breq_*: READ on a read miss, WRITE on a write miss, INV to upgrade a
//     shared copy, RELOCATE for a replaced last copy) and a local event port
//     (loc_*: PR, PW, NTO, NNOC applied to the node's snoop tag copy);
//   * the AM data arrays: data responses are broadcast on data_* with the
//     block address, the supplying and the receiving node;
//   * the relocation handlers: rel_* of every node.
// Default sizes are those of the source design's example machine: 16 nodes,
// 256 MB 4-way AM with 128-byte blocks per node and 40-bit addresses. Queue
// depth, STM latency and pending-read-buffer size are this design's choice.
//
// Timing: one bus transaction every five cycles (ARB RES ADDR DEC ACK) under
// load; after reset every node sweeps its STM to INV (one set per cycle, 2^19
// cycles at the defaults) and init_done rises when all nodes are ready.
module coma_system
  import coma_pkg::*;
#(
  parameter int unsigned     N_NODES          = 16,
  parameter int unsigned     ADDR_W           = 40,
  parameter int unsigned     BLOCK_BYTES      = 128,
  parameter int unsigned     WAYS             = 4,
  parameter longint unsigned AM_BYTES         = 64'd268435456,
  parameter int unsigned     ST_ACCESS_CYCLES = 4,
  parameter int unsigned     RFQ_DEPTH        = 4,
  parameter int unsigned     PRB_DEPTH        = 8,
  localparam int unsigned    SRC_W            = (N_NODES > 1) ? $clog2(N_NODES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              init_done,
  // processor-side bus requests
  input  logic              breq_valid [N_NODES],
  input  bus_req_e          breq_type  [N_NODES],
  input  logic [ADDR_W-1:0] breq_addr  [N_NODES],
  output logic              breq_done  [N_NODES],
  output logic              breq_retry [N_NODES],
  // processor-side protocol events
  input  logic              loc_valid  [N_NODES],
  output logic              loc_ready  [N_NODES],
  input  coh_event_e        loc_event  [N_NODES],
  input  logic [ADDR_W-1:0] loc_addr   [N_NODES],
  output logic              loc_done   [N_NODES],
  output logic              loc_ok     [N_NODES],
  output am_state_e         loc_state  [N_NODES],
  // data responses (towards the AM data arrays)
  output logic              data_valid,
  output logic [ADDR_W-1:0] data_addr,
  output logic [SRC_W-1:0]  data_src,
  output logic [SRC_W-1:0]  data_dst,
  // relocation handlers
  output logic              rel_valid  [N_NODES],
  output logic [ADDR_W-1:0] rel_addr   [N_NODES],
  output logic [SRC_W-1:0]  rel_src    [N_NODES],
  // bus observation and statistics
  output bus_phase_e        bus_phase,
  output logic              bus_nak_any,
  output logic [31:0]       txn_count,
  output logic [31:0]       retry_count,
  output logic [31:0]       prb_hold_count,
  output logic [$clog2(PRB_DEPTH+1)-1:0] prb_used,
  output logic              filtered   [N_NODES],
  output logic [15:0]       nak_count  [N_NODES],
  output logic [$clog2(RFQ_DEPTH+1)-1:0] rfq_count [N_NODES]
);

  bus_req_e          bus_type;
  logic [ADDR_W-1:0] bus_addr;
  logic [SRC_W-1:0]  bus_src;
  logic              ack [N_NODES];
  logic              nak [N_NODES];
  logic              ack_any;
  logic              resp_req  [N_NODES];
  logic [ADDR_W-1:0] resp_addr [N_NODES];
  logic [SRC_W-1:0]  resp_dst  [N_NODES];
  logic              resp_gnt  [N_NODES];
  logic [N_NODES-1:0] node_ready;

  global_bus #(
    .N_NODES(N_NODES), .ADDR_W(ADDR_W), .BLOCK_BYTES(BLOCK_BYTES),
    .PRB_DEPTH(PRB_DEPTH), .CNT_W(32)
  ) u_bus (
    .clk, .rst_n,
    .breq_valid, .breq_type, .breq_addr, .breq_done, .breq_retry,
    .bus_phase, .bus_type, .bus_addr, .bus_src,
    .ack, .nak, .bus_nak_any, .ack_any,
    .resp_req, .resp_addr, .resp_dst, .resp_gnt,
    .data_valid, .data_addr, .data_dst, .data_src,
    .txn_count, .retry_count, .prb_hold_count, .prb_used
  );

  for (genvar n = 0; n < N_NODES; n++) begin : g_node
    snoop_node #(
      .NODE_ID(n), .N_NODES(N_NODES), .ADDR_W(ADDR_W), .BLOCK_BYTES(BLOCK_BYTES),
      .WAYS(WAYS), .AM_BYTES(AM_BYTES), .ST_ACCESS_CYCLES(ST_ACCESS_CYCLES),
      .RFQ_DEPTH(RFQ_DEPTH)
    ) u_node (
      .clk, .rst_n,
      .init_done(node_ready[n]),
      .bus_phase, .bus_type, .bus_addr, .bus_src, .bus_nak_any,
      .ack(ack[n]), .nak(nak[n]),
      .resp_req(resp_req[n]), .resp_addr(resp_addr[n]), .resp_dst(resp_dst[n]),
      .resp_gnt(resp_gnt[n]),
      .loc_valid(loc_valid[n]), .loc_ready(loc_ready[n]), .loc_event(loc_event[n]),
      .loc_addr(loc_addr[n]), .loc_done(loc_done[n]), .loc_ok(loc_ok[n]),
      .loc_state(loc_state[n]),
      .rel_valid(rel_valid[n]), .rel_addr(rel_addr[n]), .rel_src(rel_src[n]),
      .nak_count(nak_count[n]), .filtered(filtered[n]), .rfq_count(rfq_count[n])
    );
  end

  assign init_done = &node_ready;

  // Every node answers every address transaction with exactly one of ACK/NAK
  a_all_answer: assert property (@(posedge clk) disable iff (!rst_n)
    (bus_phase == PH_ACK) |-> ack_any || bus_nak_any);

endmodule
