// tb_snoop_node: one node (id 1) with a slow state and tag memory
// (ST_ACCESS_CYCLES = 6), a 2-entry RFQ and a 64-set AM, driven by a
// testbench bus that issues back-to-back five-phase transactions.
// In rounds, local events first set up owned, shared and absent blocks; then a
// burst of random foreign READ/WRITE/INV/RELOCATE transactions (and some of
// the node's own) runs; then the node drains its RFQ. Checks:
//   * every transaction is answered in its ACK phase (snoop turn-around does
//     not depend on the memory's latency);
//   * NAK exactly when the RFQ was full at the ADDR phase;
//   * data responses exactly for requests to blocks the node owned at their
//     turn, in bus order, with address and destination;
//   * relocations handed over;
//   * the final state of every block (read back through local PR events).
module tb_snoop_node;
  import coma_pkg::*;
  localparam int AW = 40, N = 16, SW = 4, ID = 1, LAT = 6, QD = 2;
  localparam longint AMB = 128 * 4 * 64;

  logic clk = 0, rst_n = 0, init_done;
  bus_phase_e bus_phase;
  bus_req_e bus_type;
  logic [AW-1:0] bus_addr, resp_addr, loc_addr, rel_addr;
  logic [SW-1:0] bus_src, resp_dst, rel_src;
  logic bus_nak_any, ack, nak, resp_req, resp_gnt;
  logic loc_valid, loc_ready, loc_done, loc_ok, rel_valid, filtered;
  coh_event_e loc_event;
  am_state_e loc_state;
  logic [15:0] nak_count;
  logic [$clog2(QD+1)-1:0] rfq_count;
  logic other_nak;

  snoop_node #(.NODE_ID(ID), .N_NODES(N), .ADDR_W(AW), .AM_BYTES(AMB),
               .ST_ACCESS_CYCLES(LAT), .RFQ_DEPTH(QD)) dut (.*);

  always #5 clk = ~clk;
  assign bus_nak_any = (bus_phase == PH_ACK) && (nak || other_nak);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  function automatic logic [AW-1:0] blk(input int b);
    return (AW'(b) << 20) | (AW'(b % 4) << 7);   // blocks 0..7 share 4 sets
  endfunction

  am_state_e model [8];
  logic [AW-1:0] exp_resp_a [$];
  logic [SW-1:0] exp_resp_d [$];
  int n_resp = 0, n_nak = 0, n_rel = 0, n_ans = 0, n_txn = 0;
  int queued = 0;     // requests in the model RFQ

  // data responses: granted right away, compared in order
  assign resp_gnt = resp_req;
  always @(posedge clk) if (rst_n && resp_req) begin
    check(exp_resp_a.size() > 0, "data response expected");
    if (exp_resp_a.size() > 0) begin
      check(resp_addr == exp_resp_a[0] && resp_dst == exp_resp_d[0], "data response in bus order");
      void'(exp_resp_a.pop_front()); void'(exp_resp_d.pop_front());
    end
    n_resp++;
  end

  task automatic local_ev(input coh_event_e e, input int b);
    @(negedge clk);
    loc_valid = 1; loc_event = e; loc_addr = blk(b);
    @(posedge clk);
    while (!loc_ready) @(posedge clk);
    #1 loc_valid = 0;
    while (!loc_done) @(posedge clk);
    #1;
  endtask

  task automatic bus_txn(input bus_req_e ty, input int b, input logic [SW-1:0] src,
                         input bit onak);
    bit full_at_addr, foreign;
    foreign = (src != SW'(ID));
    @(negedge clk) bus_phase = PH_ARB;
    @(negedge clk) bus_phase = PH_RES;
    @(negedge clk) begin
      bus_phase = PH_ADDR; bus_type = ty; bus_addr = blk(b) | AW'($urandom % 128); bus_src = src;
      full_at_addr = (rfq_count == QD);
    end
    @(negedge clk) bus_phase = PH_DEC;
    @(negedge clk) begin
      bus_phase = PH_ACK; other_nak = onak; #1;
      check(ack ^ nak, "answered in ACK phase");
      n_ans++;
      check(nak == (foreign && ty != REQ_RELOCATE && full_at_addr), "NAK iff RFQ full");
      if (nak) n_nak++;
      check(rel_valid == (foreign && ty == REQ_RELOCATE && !bus_nak_any), "relocation hand-over");
      if (rel_valid) begin n_rel++; check(rel_addr[AW-1:7] == blk(b) >> 7 && rel_src == src, "relocation fields"); end
      if (foreign && ty != REQ_RELOCATE && !bus_nak_any) begin
        // model the handler in bus order
        case (ty)
          REQ_READ: if (model[b] inside {ST_EXL, ST_SHO}) begin
              exp_resp_a.push_back(bus_addr); exp_resp_d.push_back(src);
              model[b] = ST_SHO;
            end
          REQ_WRITE: begin
              if (model[b] inside {ST_EXL, ST_SHO}) begin
                exp_resp_a.push_back(bus_addr); exp_resp_d.push_back(src);
              end
              model[b] = ST_INV;
            end
          default: model[b] = ST_INV;
        endcase
      end
      n_txn++;
    end
    @(negedge clk) begin bus_phase = PH_IDLE; other_nak = 0; end
  endtask

  initial begin
    bus_phase = PH_IDLE; bus_type = REQ_READ; bus_addr = '0; bus_src = '0; other_nak = 0;
    loc_valid = 0; loc_event = EV_PR; loc_addr = '0;
    foreach (model[b]) model[b] = ST_INV;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (init_done);
    for (int round = 0; round < 25; round++) begin
      // set-up by local events
      for (int b = 0; b < 8; b++) begin
        int unsigned r;
        r = $urandom;
        case (r[2:0])
          0, 1: begin local_ev(EV_PW, b); model[b] = ST_EXL; end
          2:    begin local_ev(EV_PR, b); if (model[b] == ST_INV) model[b] = ST_SHN;
                      local_ev(EV_NTO, b); if (model[b] == ST_SHN) model[b] = ST_SHO; end
          3:    begin local_ev(EV_PR, b); if (model[b] == ST_INV) model[b] = ST_SHN; end
          4:    begin local_ev(EV_NNOC, b); model[b] = ST_EXL; end
          default: ;
        endcase
      end
      // burst of bus transactions, back to back
      for (int t = 0; t < 12; t++) begin
        int unsigned r;
        r = $urandom;
        bus_txn(bus_req_e'(r[3:2] == 3 && r[5:4] != 0 ? 0 : r[3:2]), int'(r[8:6]),
                (r[11:9] == 0) ? SW'(ID) : SW'(r[15:12] == ID ? 0 : r[15:12]), r[18:16] == 0);
      end
      // drain
      repeat (QD * 4 * (LAT + 4)) @(posedge clk);
      check(exp_resp_a.size() == 0, "all data responses given");
      // read the states back: PR leaves owned and shared copies alone
      for (int b = 0; b < 8; b++) begin
        am_state_e e;
        e = (model[b] == ST_INV) ? ST_SHN : model[b];
        local_ev(EV_PR, b);
        check(loc_ok && loc_state == e, $sformatf("state of block %0d: %0d expected %0d", b, loc_state, e));
        model[b] = e;
      end
    end
    $display("txns=%0d answered=%0d naks=%0d responses=%0d relocations=%0d",
             n_txn, n_ans, n_nak, n_resp, n_rel);
    check(n_nak > 0 && n_resp > 0 && n_rel > 0 && nak_count == 16'(n_nak), "NAK, data and relocation seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
