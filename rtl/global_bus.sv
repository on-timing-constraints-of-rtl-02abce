// global_bus: transaction sequencer and arbiter of the shared global bus.
//
// Every address transaction runs through the five phases of the reference
// bus: ARB (requests sampled), RES (winner resolved), ADDR (address, type and
// issuer driven; every node latches them at the end of the cycle, time Ta/Tc),
// DEC (decode) and ACK (every node drives ACK or NAK, time Tb/Td). The snoop
// window from the latch at the end of ADDR to the answer in ACK is therefore
// two bus cycles whatever the speed of the nodes' state and tag memory. If any
// node answers NAK the transaction is void: the issuer gets a retry strobe and
// its request competes again. Otherwise it gets a done strobe.
//
// A READ or WRITE that completes is recorded in the pending read buffer and no
// request for the same block is granted until the block's owner has put its
// data response on the bus. Data responses use a separate channel: one per
// cycle is granted (lowest node number first) and broadcast on data_*.
//
// Follows the source design: the five phases, ACK/NAK with retry, the pending
// read buffer. This design's choices: one address transaction at a time (no
// overlap of phases of consecutive transactions), round-robin arbitration,
// single-cycle phases, the data channel and its priority.
//
// Interface: a requester holds breq_valid/type/addr steady until breq_done.
module global_bus
  import coma_pkg::*;
#(
  parameter int unsigned N_NODES     = 16,
  parameter int unsigned ADDR_W      = 40,
  parameter int unsigned BLOCK_BYTES = 128,
  parameter int unsigned PRB_DEPTH   = 8,
  parameter int unsigned CNT_W       = 32,
  localparam int unsigned SRC_W      = (N_NODES > 1) ? $clog2(N_NODES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // requesters
  input  logic              breq_valid [N_NODES],
  input  bus_req_e          breq_type  [N_NODES],
  input  logic [ADDR_W-1:0] breq_addr  [N_NODES],
  output logic              breq_done  [N_NODES],
  output logic              breq_retry [N_NODES],
  // address bus, seen by every snooper
  output bus_phase_e        bus_phase,
  output bus_req_e          bus_type,
  output logic [ADDR_W-1:0] bus_addr,
  output logic [SRC_W-1:0]  bus_src,
  // snoop answers
  input  logic              ack [N_NODES],
  input  logic              nak [N_NODES],
  output logic              bus_nak_any,
  output logic              ack_any,
  // data-response channel
  input  logic              resp_req  [N_NODES],
  input  logic [ADDR_W-1:0] resp_addr [N_NODES],
  input  logic [SRC_W-1:0]  resp_dst  [N_NODES],
  output logic              resp_gnt  [N_NODES],
  output logic              data_valid,
  output logic [ADDR_W-1:0] data_addr,
  output logic [SRC_W-1:0]  data_dst,
  output logic [SRC_W-1:0]  data_src,
  // statistics
  output logic [CNT_W-1:0]  txn_count,     // transactions acknowledged
  output logic [CNT_W-1:0]  retry_count,   // transactions NAKed
  output logic [CNT_W-1:0]  prb_hold_count, // ARB cycles with a request held back
  output logic [$clog2(PRB_DEPTH+1)-1:0] prb_used
);

  // ---------------- pending read buffer ----------------
  logic prb_blocked [N_NODES];
  logic prb_full;
  logic prb_ins, prb_rel;
  logic [ADDR_W-1:0] prb_rel_addr;

  pending_read_buffer #(
    .ADDR_W(ADDR_W), .BLOCK_BYTES(BLOCK_BYTES), .DEPTH(PRB_DEPTH), .NPORT(N_NODES)
  ) u_prb (
    .clk, .rst_n,
    .ins_valid(prb_ins), .ins_addr(bus_addr),
    .rel_valid(prb_rel), .rel_addr(prb_rel_addr),
    .chk_addr(breq_addr), .blocked(prb_blocked),
    .full(prb_full), .used(prb_used)
  );

  // ---------------- eligibility and arbitration ----------------
  logic [N_NODES-1:0] eligible, held, req_mask;
  always_comb begin
    for (int i = 0; i < N_NODES; i++) begin
      held[i] = breq_valid[i] && breq_type[i] inside {REQ_READ, REQ_WRITE}
                && (prb_blocked[i] || prb_full);
      eligible[i] = breq_valid[i] && !held[i];
    end
  end

  logic [SRC_W-1:0] rr_last;   // last winner
  logic [SRC_W-1:0] winner;
  always_comb begin
    winner = rr_last;
    for (int k = N_NODES; k >= 1; k--) begin
      logic [SRC_W-1:0] c;
      c = SRC_W'((int'(rr_last) + k) % N_NODES);
      if (req_mask[c]) winner = SRC_W'(c);
    end
  end

  // ---------------- phase sequencer ----------------
  wire any_eligible = |eligible;
  logic ack_seen;
  always_comb begin
    ack_seen = 1'b0;
    bus_nak_any = 1'b0;
    for (int i = 0; i < N_NODES; i++) begin
      if (bus_phase == PH_ACK && nak[i]) bus_nak_any = 1'b1;
      if (bus_phase == PH_ACK && ack[i]) ack_seen = 1'b1;
    end
  end
  assign ack_any = ack_seen;
  wire data_type = (bus_type == REQ_READ) || (bus_type == REQ_WRITE);
  assign prb_ins = (bus_phase == PH_ACK) && !bus_nak_any && data_type;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_phase      <= PH_IDLE;
      bus_type       <= REQ_READ;
      bus_addr       <= '0;
      bus_src        <= '0;
      req_mask       <= '0;
      rr_last        <= SRC_W'(N_NODES - 1);
      txn_count      <= '0;
      retry_count    <= '0;
      prb_hold_count <= '0;
    end else begin
      unique case (bus_phase)
        PH_IDLE: if (any_eligible) bus_phase <= PH_ARB;
        PH_ARB: begin
          req_mask  <= eligible;
          if (|held) prb_hold_count <= prb_hold_count + 1'b1;
          bus_phase <= PH_RES;
        end
        PH_RES: begin
          if (req_mask == '0) begin
            bus_phase <= PH_IDLE;
          end else begin
            rr_last   <= winner;
            bus_src   <= winner;
            bus_type  <= breq_type[winner];
            bus_addr  <= breq_addr[winner];
            bus_phase <= PH_ADDR;
          end
        end
        PH_ADDR: bus_phase <= PH_DEC;
        PH_DEC:  bus_phase <= PH_ACK;
        PH_ACK: begin
          if (bus_nak_any) retry_count <= retry_count + 1'b1;
          else             txn_count   <= txn_count + 1'b1;
          bus_phase <= any_eligible ? PH_ARB : PH_IDLE;
        end
        default: bus_phase <= PH_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int i = 0; i < N_NODES; i++) begin
      breq_done[i]  = (bus_phase == PH_ACK) && (bus_src == SRC_W'(i)) && !bus_nak_any;
      breq_retry[i] = (bus_phase == PH_ACK) && (bus_src == SRC_W'(i)) && bus_nak_any;
    end
  end

  // ---------------- data-response channel ----------------
  always_comb begin
    prb_rel      = 1'b0;
    prb_rel_addr = '0;
    for (int i = 0; i < N_NODES; i++) resp_gnt[i] = 1'b0;
    for (int i = N_NODES - 1; i >= 0; i--) begin
      if (resp_req[i]) begin
        for (int j = 0; j < N_NODES; j++) resp_gnt[j] = (j == i);
        prb_rel      = 1'b1;
        prb_rel_addr = resp_addr[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_valid <= 1'b0;
      data_addr  <= '0;
      data_dst   <= '0;
      data_src   <= '0;
    end else begin
      data_valid <= prb_rel;
      if (prb_rel) data_addr <= prb_rel_addr;
      for (int i = 0; i < N_NODES; i++)
        if (resp_gnt[i]) begin
          data_dst <= resp_dst[i];
          data_src <= SRC_W'(i);
        end
    end
  end

  // A requester keeps its request steady until it is done
  for (genvar i = 0; i < N_NODES; i++) begin : g_chk
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      (breq_valid[i] && !breq_done[i]) |=> breq_valid[i]);
  end

endmodule
