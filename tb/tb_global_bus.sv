// tb_global_bus: four requesters issue random transactions on a small bus
// (4 nodes, 2-entry pending read buffer); the testbench plays the snoopers
// (random NAKs) and the block owners (data responses after random delays).
// Checks: the five phases in order, one cycle each, with the next ARB right
// after ACK under load; the address phase carries a pending request of the
// winner; done/retry strobes follow the NAK line; no READ/WRITE to a block
// with an outstanding data response is ever issued; data grants go to the
// lowest requesting node and are broadcast a cycle later; the counters; and
// that every request completes (no starvation).
module tb_global_bus;
  import coma_pkg::*;
  localparam int N = 4, AW = 40, SW = 2, PD = 2;

  logic clk = 0, rst_n = 0;
  logic breq_valid [N], breq_done [N], breq_retry [N];
  bus_req_e breq_type [N];
  logic [AW-1:0] breq_addr [N];
  bus_phase_e bus_phase;
  bus_req_e bus_type;
  logic [AW-1:0] bus_addr, data_addr;
  logic [SW-1:0] bus_src, data_dst, data_src;
  logic ack [N], nak [N];
  logic bus_nak_any, ack_any, data_valid;
  logic resp_req [N], resp_gnt [N];
  logic [AW-1:0] resp_addr [N];
  logic [SW-1:0] resp_dst [N];
  logic [31:0] txn_count, retry_count, prb_hold_count;
  logic [$clog2(PD+1)-1:0] prb_used;

  global_bus #(.N_NODES(N), .ADDR_W(AW), .BLOCK_BYTES(128), .PRB_DEPTH(PD)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  function automatic logic [AW-1:0] blk_addr(input int b, input int off);
    return (AW'(b) << 12) | AW'(off % 128);
  endfunction

  int done_cnt [N];
  int n_done = 0, n_retry = 0, n_b2b = 0, n_data = 0;
  int pend [8];          // outstanding data responses per block
  int owed_q [$];        // blocks owed a data response
  logic [SW-1:0] owed_dst [$];
  bus_phase_e prev_phase;
  logic exp_dv; logic [AW-1:0] exp_da; logic [SW-1:0] exp_dd, exp_ds;

  // snoopers: random NAKs in ACK
  always @(negedge clk) begin
    int unsigned r;
    r = $urandom;
    for (int i = 0; i < N; i++) begin
      nak[i] = (bus_phase == PH_ACK) && (r[3*i +: 3] == 0);
      ack[i] = (bus_phase == PH_ACK) && !nak[i];
    end
  end

  // owners: one data response at a time per owner slot, lowest node wins
  always @(negedge clk) begin
    int unsigned r;
    r = $urandom;
    for (int i = 0; i < N; i++) if (!resp_req[i] && owed_q.size() > 0 && r[2*i +: 2] == 0) begin
      resp_req[i] = 1; resp_addr[i] = blk_addr(owed_q.pop_front(), 5); resp_dst[i] = owed_dst.pop_front();
    end
  end

  always @(posedge clk) if (rst_n) begin
    // phase order
    case (prev_phase)
      PH_ARB:  check(bus_phase == PH_RES, "ARB->RES");
      PH_RES:  check(bus_phase == PH_ADDR || bus_phase == PH_IDLE, "RES->ADDR (or IDLE when all held)");
      PH_ADDR: check(bus_phase == PH_DEC, "ADDR->DEC");
      PH_DEC:  check(bus_phase == PH_ACK, "DEC->ACK");
      PH_ACK:  if (bus_phase == PH_ARB) n_b2b++;
      default: ;
    endcase
    prev_phase = bus_phase;
    // data channel: last cycle's grant appears now
    check(data_valid == exp_dv, "data_valid follows grant");
    if (exp_dv) begin
      check(data_addr == exp_da && data_dst == exp_dd && data_src == exp_ds, "data broadcast");
      n_data++;
    end
    exp_dv = 0;
    for (int i = N - 1; i >= 0; i--) if (resp_req[i]) begin
      exp_dv = 1; exp_da = resp_addr[i]; exp_dd = resp_dst[i]; exp_ds = SW'(i);
    end
    for (int i = 0; i < N; i++) begin
      check(resp_gnt[i] == (exp_dv && exp_ds == SW'(i)), "grant to lowest requester");
      if (resp_gnt[i]) begin
        resp_req[i] <= 0;
        pend[int'(resp_addr[i] >> 12)] = 0;
      end
    end
    if (bus_phase == PH_ADDR) begin
      int b;
      check(breq_valid[bus_src] && breq_addr[bus_src] == bus_addr && breq_type[bus_src] == bus_type,
            "ADDR carries the winner's request");
      b = int'(bus_addr >> 12);
      if (bus_type inside {REQ_READ, REQ_WRITE})
        check(pend[b] == 0, "no request to a block with a pending data response");
    end
    if (bus_phase == PH_ACK) begin
      for (int i = 0; i < N; i++) begin
        check(breq_done[i] == (bus_src == SW'(i) && !bus_nak_any), "done strobe");
        check(breq_retry[i] == (bus_src == SW'(i) && bus_nak_any), "retry strobe");
      end
      if (bus_nak_any) n_retry++;
      else begin
        n_done++;
        if (bus_type inside {REQ_READ, REQ_WRITE}) begin
          pend[int'(bus_addr >> 12)]++;
          owed_q.push_back(int'(bus_addr >> 12)); owed_dst.push_back(bus_src);
        end
      end
    end
  end

  initial begin
    prev_phase = PH_IDLE; exp_dv = 0;
    foreach (pend[b]) pend[b] = 0;
    for (int i = 0; i < N; i++) begin
      breq_valid[i] = 0; breq_type[i] = REQ_READ; breq_addr[i] = '0;
      resp_req[i] = 0; resp_addr[i] = '0; resp_dst[i] = '0; done_cnt[i] = 0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < N; i++) begin
      automatic int n = i;
      fork
        for (int k = 0; k < 60; k++) begin
          int unsigned r;
          @(negedge clk);
          r = $urandom;
          repeat (r[1:0]) @(negedge clk);
          breq_valid[n] = 1;
          breq_type[n]  = bus_req_e'(r[4:3] == 3 ? 2 : r[4:3]);
          breq_addr[n]  = blk_addr(int'(r[7:5]), int'(r[14:8]));
          @(posedge clk);
          while (!breq_done[n]) @(posedge clk);
          done_cnt[n]++;
          @(negedge clk) breq_valid[n] = 0;
        end
      join_none
    end
    wait (done_cnt[0] == 60 && done_cnt[1] == 60 && done_cnt[2] == 60 && done_cnt[3] == 60);
    repeat (40) @(posedge clk);
    check(txn_count == 32'(n_done) && retry_count == 32'(n_retry), "transaction counters");
    check(n_done == 4 * 60, "every request completed");
    $display("done=%0d retry=%0d back2back=%0d data=%0d prb_holds=%0d",
             n_done, n_retry, n_b2b, n_data, prb_hold_count);
    check(n_retry > 0 && n_b2b > 0 && n_data > 0 && prb_hold_count > 0, "retry, back-to-back, data, PRB hold seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
