// snoop_node: the coherence side of one processor node with relaxed snooping.
//
// The processor, its two cache levels and the attraction-memory (AM) data
// array sit outside this module. Inside are the parts that answer the global
// bus: the snooper, the Request FIFO Queue (RFQ), the bus driver, the
// cache/AM controller and the snoop copy of the AM's state and tag memory
// (STM). The snooper only queues each foreign request (or answers NAK if the
// RFQ is full), so the bus never waits on the slow STM; the controller later
// works through the RFQ in bus order, supplying data where this node is the
// block's owner and updating the state. Relocation requests bypass the queue
// and leave on the rel_* port for a relocation handler. The node's own
// protocol events (processor read/write, ownership transfer, arrival of a
// relocated last copy) enter on loc_* and keep the snoop copy up to date.
//
// The organisation follows the source design's snooping mechanism; the local
// event port and the widths of the internal queue entries are this design's.
//
// Timing: a foreign request is latched at the end of the bus ADDR phase and
// answered in the ACK phase, two cycles later, independent of ST_ACCESS_CYCLES.
module snoop_node
  import coma_pkg::*;
#(
  parameter int unsigned     NODE_ID          = 0,
  parameter int unsigned     N_NODES          = 16,
  parameter int unsigned     ADDR_W           = 40,
  parameter int unsigned     BLOCK_BYTES      = 128,
  parameter int unsigned     WAYS             = 4,
  parameter longint unsigned AM_BYTES         = 64'd268435456,
  parameter int unsigned     ST_ACCESS_CYCLES = 4,
  parameter int unsigned     RFQ_DEPTH        = 4,
  localparam int unsigned    SRC_W            = (N_NODES > 1) ? $clog2(N_NODES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              init_done,
  // global address bus
  input  bus_phase_e        bus_phase,
  input  bus_req_e          bus_type,
  input  logic [ADDR_W-1:0] bus_addr,
  input  logic [SRC_W-1:0]  bus_src,
  input  logic              bus_nak_any,
  output logic              ack,
  output logic              nak,
  // data-response channel
  output logic              resp_req,
  output logic [ADDR_W-1:0] resp_addr,
  output logic [SRC_W-1:0]  resp_dst,
  input  logic              resp_gnt,
  // local protocol events
  input  logic              loc_valid,
  output logic              loc_ready,
  input  coh_event_e        loc_event,
  input  logic [ADDR_W-1:0] loc_addr,
  output logic              loc_done,
  output logic              loc_ok,
  output am_state_e         loc_state,
  // relocation handler
  output logic              rel_valid,
  output logic [ADDR_W-1:0] rel_addr,
  output logic [SRC_W-1:0]  rel_src,
  // statistics
  output logic [15:0]       nak_count,
  output logic              filtered,
  output logic [$clog2(RFQ_DEPTH+1)-1:0] rfq_count
);

  localparam int unsigned ENT_W = 2 + ADDR_W + SRC_W;

  // snooper -> RFQ / bus driver
  logic ok_valid, ok, rfq_push, rfq_full, rfq_empty, rfq_pop;
  bus_req_e          push_type;
  logic [ADDR_W-1:0] push_addr;
  logic [SRC_W-1:0]  push_src;
  logic [ENT_W-1:0]  rfq_head;

  snooper #(.ADDR_W(ADDR_W), .SRC_W(SRC_W), .NODE_ID(NODE_ID)) u_snooper (
    .clk, .rst_n,
    .bus_phase, .bus_type, .bus_addr, .bus_src, .bus_nak_any,
    .ok_valid, .ok,
    .rfq_full, .rfq_push, .push_type, .push_addr, .push_src,
    .rel_valid, .rel_addr, .rel_src
  );

  rfq #(.WIDTH(ENT_W), .DEPTH(RFQ_DEPTH)) u_rfq (
    .clk, .rst_n,
    .push(rfq_push), .push_data({push_type, push_addr, push_src}),
    .pop(rfq_pop), .head(rfq_head),
    .empty(rfq_empty), .full(rfq_full), .count(rfq_count)
  );

  // controller <-> STM, bus driver
  logic              st_init_done, st_req_valid, st_req_ready, st_req_set, st_resp_valid;
  logic [ADDR_W-1:0] st_req_addr;
  am_state_e         st_req_state;
  lookup_t           st_resp;
  logic              pd_valid, pd_ready;
  logic [ADDR_W-1:0] pd_addr;
  logic [SRC_W-1:0]  pd_dst;

  am_controller #(.ADDR_W(ADDR_W), .SRC_W(SRC_W)) u_ctl (
    .clk, .rst_n,
    .rfq_empty,
    .rfq_type(bus_req_e'(rfq_head[ENT_W-1 -: 2])),
    .rfq_addr(rfq_head[SRC_W +: ADDR_W]),
    .rfq_src(rfq_head[SRC_W-1:0]),
    .rfq_pop,
    .loc_valid, .loc_ready, .loc_event, .loc_addr, .loc_done, .loc_ok, .loc_state,
    .st_init_done, .st_req_valid, .st_req_ready, .st_req_set, .st_req_addr,
    .st_req_state, .st_resp_valid, .st_resp,
    .pd_valid, .pd_ready, .pd_addr, .pd_dst,
    .filtered
  );

  state_tag_storage #(
    .ADDR_W(ADDR_W), .BLOCK_BYTES(BLOCK_BYTES), .WAYS(WAYS),
    .AM_BYTES(AM_BYTES), .ACCESS_CYCLES(ST_ACCESS_CYCLES)
  ) u_stm (
    .clk, .rst_n,
    .init_done(st_init_done),
    .req_valid(st_req_valid), .req_ready(st_req_ready), .req_set(st_req_set),
    .req_addr(st_req_addr), .req_state(st_req_state),
    .resp_valid(st_resp_valid), .resp(st_resp)
  );

  bus_driver #(.ADDR_W(ADDR_W), .SRC_W(SRC_W), .CNT_W(16)) u_drv (
    .clk, .rst_n, .bus_phase,
    .ok_valid, .ok, .ack, .nak,
    .pd_valid, .pd_ready, .pd_addr, .pd_dst,
    .resp_req, .resp_addr, .resp_dst, .resp_gnt,
    .nak_count
  );

  assign init_done = st_init_done;

endmodule
