// am_controller: cache/AM controller of one node, the request handler that
// works through the Request FIFO Queue (RFQ) at the pace of the slow state and
// tag memory (STM).
//
// For the request at the head of the RFQ it does what the source design's
// FIFO handler does:
//   READ  : look up the block. Absent (DONT_HAVE) or a non-owner copy (SHN):
//           drop the request. Owner (EXL or SHO): issue Provide_Data, then
//           apply the bus-read transition (EXL becomes SHO) and write the state
//           only if it changed. Ownership thus filters out most of the work.
//   WRITE : look up the block. Absent: drop. Owner: issue Provide_Data. Then
//           write INV.
//   INV   : write INV (the STM write finds the block itself).
// The request is removed from the RFQ when its work is done. The source's
// handler leaves an absent block's request in the queue ("break" without
// removing it), which would stall the queue for good; here it is removed.
//
// The same STM copy must follow the node's own (processor-side) events, so
// the controller also takes local protocol events (PR, PW, NTO, NNOC; see
// coherence_fsm) on the loc_* port: look up, compute the next state, write it
// if it changed (installing an absent block). This port, and alternating
// priority between it and the RFQ, are this design's choices.
//
// Timing: every STM access costs the STM's latency; a READ that needs no
// action costs one look-up, an owner READ costs a look-up, the Provide_Data
// handshake and a write. rfq_pop and loc_done are one-cycle strobes.
module am_controller
  import coma_pkg::*;
#(
  parameter int unsigned ADDR_W = 40,
  parameter int unsigned SRC_W  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // RFQ head
  input  logic              rfq_empty,
  input  bus_req_e          rfq_type,
  input  logic [ADDR_W-1:0] rfq_addr,
  input  logic [SRC_W-1:0]  rfq_src,
  output logic              rfq_pop,
  // local protocol events
  input  logic              loc_valid,
  output logic              loc_ready,
  input  coh_event_e        loc_event,
  input  logic [ADDR_W-1:0] loc_addr,
  output logic              loc_done,
  output logic              loc_ok,      // state written (or nothing to write)
  output am_state_e         loc_state,   // state of the block afterwards
  // state and tag memory
  input  logic              st_init_done,
  output logic              st_req_valid,
  input  logic              st_req_ready,
  output logic              st_req_set,
  output logic [ADDR_W-1:0] st_req_addr,
  output am_state_e         st_req_state,
  input  logic              st_resp_valid,
  input  lookup_t           st_resp,
  // Provide_Data towards the bus driver
  output logic              pd_valid,
  input  logic              pd_ready,
  output logic [ADDR_W-1:0] pd_addr,
  output logic [SRC_W-1:0]  pd_dst,
  // one-cycle strobe: an RFQ request was dropped without action (filtered)
  output logic              filtered
);

  typedef enum logic [2:0] {
    S_IDLE, S_LOOK, S_LOOK_WAIT, S_PROVIDE, S_SET, S_SET_WAIT
  } ctl_state_e;

  ctl_state_e   cs;
  logic         job_local;
  bus_req_e     job_type;
  coh_event_e   job_ev;
  logic [ADDR_W-1:0] job_addr;
  logic [SRC_W-1:0]  job_src;
  am_state_e    cur_st;     // looked-up state
  am_state_e    new_st;     // state to write
  logic         prefer_loc; // alternating priority

  am_state_e  fsm_next;
  logic       fsm_changed;
  coherence_fsm u_fsm (.state(cur_st), .ev(job_ev), .next_state(fsm_next), .changed(fsm_changed));

  wire lk_st_owner = st_resp.hit && (st_resp.state == ST_EXL || st_resp.state == ST_SHO);
  wire take_loc = (cs == S_IDLE) && st_init_done && loc_valid && (prefer_loc || rfq_empty);
  // rfq_pop takes effect at the end of its cycle: the head is stale until then
  wire take_rfq = (cs == S_IDLE) && st_init_done && !rfq_empty && !rfq_pop && !take_loc;

  assign loc_ready = take_loc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs         <= S_IDLE;
      job_local  <= 1'b0;
      job_type   <= REQ_READ;
      job_ev     <= EV_PR;
      job_addr   <= '0;
      job_src    <= '0;
      cur_st     <= ST_INV;
      new_st     <= ST_INV;
      prefer_loc <= 1'b0;
      rfq_pop    <= 1'b0;
      loc_done   <= 1'b0;
      loc_ok     <= 1'b0;
      loc_state  <= ST_INV;
      filtered   <= 1'b0;
    end else begin
      rfq_pop  <= 1'b0;
      loc_done <= 1'b0;
      filtered <= 1'b0;
      unique case (cs)
        S_IDLE: begin
          if (take_loc) begin
            job_local  <= 1'b1;
            job_ev     <= loc_event;
            job_addr   <= loc_addr;
            prefer_loc <= 1'b0;
            cs         <= S_LOOK;
          end else if (take_rfq) begin
            job_local  <= 1'b0;
            job_type   <= rfq_type;
            job_addr   <= rfq_addr;
            job_src    <= rfq_src;
            prefer_loc <= 1'b1;
            unique case (rfq_type)
              REQ_READ:  begin job_ev <= EV_NR; cs <= S_LOOK; end
              REQ_WRITE: begin job_ev <= EV_NW; cs <= S_LOOK; end
              default:   begin job_ev <= EV_NI; new_st <= ST_INV; cs <= S_SET; end
            endcase
          end
        end
        S_LOOK: if (st_req_ready) cs <= S_LOOK_WAIT;
        S_LOOK_WAIT: if (st_resp_valid) begin
          cur_st <= st_resp.hit ? st_resp.state : ST_INV;
          if (job_local) begin
            cs <= S_SET;  // next state computed from cur_st in S_SET
          end else if (!st_resp.hit) begin
            rfq_pop  <= 1'b1;             // DONT_HAVE: don't bother
            filtered <= 1'b1;
            cs       <= S_IDLE;
          end else if (lk_st_owner) begin
            cs <= S_PROVIDE;              // owner supplies the block
          end else if (job_type == REQ_WRITE) begin
            new_st <= ST_INV;             // non-owner copy of a written block
            cs     <= S_SET;
          end else begin
            rfq_pop  <= 1'b1;             // non-owner read: none of my business
            filtered <= 1'b1;
            cs       <= S_IDLE;
          end
        end
        S_PROVIDE: if (pd_ready) begin
          if (job_type == REQ_WRITE) begin
            new_st <= ST_INV;
            cs     <= S_SET;
          end else if (fsm_changed) begin
            new_st <= fsm_next;           // EXL -> SHO on a bus read
            cs     <= S_SET;
          end else begin
            rfq_pop <= 1'b1;
            cs      <= S_IDLE;
          end
        end
        S_SET: begin
          if (job_local && !fsm_changed) begin
            loc_done  <= 1'b1;            // nothing to write
            loc_ok    <= 1'b1;
            loc_state <= cur_st;
            cs        <= S_IDLE;
          end else begin
            if (job_local) new_st <= fsm_next;
            if (st_req_ready) cs <= S_SET_WAIT;
          end
        end
        S_SET_WAIT: if (st_resp_valid) begin
          if (job_local) begin
            loc_done  <= 1'b1;
            loc_ok    <= st_resp.hit || new_st == ST_INV;
            loc_state <= st_resp.hit ? new_st : cur_st;
          end else begin
            rfq_pop <= 1'b1;
          end
          cs <= S_IDLE;
        end
        default: cs <= S_IDLE;
      endcase
    end
  end

  assign st_req_valid = (cs == S_LOOK) || (cs == S_SET && !(job_local && !fsm_changed));
  assign st_req_set   = (cs == S_SET);
  assign st_req_addr  = job_addr;
  assign st_req_state = job_local ? fsm_next : new_st;

  assign pd_valid = (cs == S_PROVIDE);
  assign pd_addr  = job_addr;
  assign pd_dst   = job_src;

endmodule
