// coma_system_driver: processor-side stimulus and checker for coma_system,
// shared by the reduced-size and the full-size system testbenches.
//
// It plays the processors of all nodes and keeps a golden copy of every
// node's state for a pool of NB blocks. After the state and tag memories are
// swept it
//   1. gives every block an initial owner: a relocated last copy arrives at a
//      random node (local NNOC event -> EXL);
//   2. runs SEQ_OPS random operations one at a time: read misses (bus READ,
//      wait for the owner's data, local PR -> SHN), write misses (bus WRITE,
//      owner's data, local PW -> EXL), upgrades of shared copies (bus INV,
//      local PW), relocation requests (handed to every other node);
//   3. runs BURSTS bursts in which every node at once read-misses on blocks
//      it does not hold, which fills owners' RFQs (NAK and retry) and makes
//      several nodes ask for the same block (pending read buffer hold);
//   4. reads back every valid copy with a local PR event.
// Every data response must answer an outstanding request, come from the
// block's single owner and reach its requester; bus transactions must finish.
// Mechanisms counted (each must occur): NAK/retry, pending-read hold, data
// supply, EXL->SHO on a bus read, filtering of requests a node need not act
// on, invalidation, write-miss invalidation, relocation hand-over.
module coma_system_driver
  import coma_pkg::*;
#(
  parameter int N       = 4,
  parameter int AW      = 40,
  parameter int SW      = 2,
  parameter int QD      = 2,
  parameter int PD      = 8,
  parameter int NB      = 12,
  parameter int SEQ_OPS = 200,
  parameter int BURSTS  = 20,
  parameter longint MAX_CYCLES = 200000
) (
  output logic              clk,
  output logic              rst_n,
  input  logic              init_done,
  output logic              breq_valid [N],
  output bus_req_e          breq_type  [N],
  output logic [AW-1:0]     breq_addr  [N],
  input  logic              breq_done  [N],
  input  logic              breq_retry [N],
  output logic              loc_valid  [N],
  input  logic              loc_ready  [N],
  output coh_event_e        loc_event  [N],
  output logic [AW-1:0]     loc_addr   [N],
  input  logic              loc_done   [N],
  input  logic              loc_ok     [N],
  input  am_state_e         loc_state  [N],
  input  logic              data_valid,
  input  logic [AW-1:0]     data_addr,
  input  logic [SW-1:0]     data_src,
  input  logic [SW-1:0]     data_dst,
  input  logic              rel_valid  [N],
  input  logic [AW-1:0]     rel_addr   [N],
  input  logic [SW-1:0]     rel_src    [N],
  input  bus_phase_e        bus_phase,
  input  logic              bus_nak_any,
  input  logic [31:0]       txn_count,
  input  logic [31:0]       retry_count,
  input  logic [31:0]       prb_hold_count,
  input  logic              filtered   [N],
  input  logic [QD > 0 ? $clog2(QD+1)-1 : 0:0] rfq_count [N]
);

  int checks = 0, failures = 0;
  longint cycle = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @cycle %0d", what, cycle); end
  endtask

  initial clk = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  function automatic logic [AW-1:0] blk(input int b);
    return AW'(b) << 7;
  endfunction

  am_state_e gold [N][NB];       // golden state of every copy
  int  want  [N][NB];            // outstanding data requests
  int  got   [N][NB];            // data responses received
  int  n_data = 0, n_filtered = 0, n_rel = 0, n_exl2sho = 0, n_inv = 0, n_wmiss = 0, n_upgrade = 0;

  function automatic int owner_of(input int b);
    for (int n = 0; n < N; n++) if (gold[n][b] inside {ST_EXL, ST_SHO}) return n;
    return -1;
  endfunction

  // ---------------- monitors ----------------
  always @(posedge clk) if (rst_n) begin
    if (data_valid) begin
      int b, d;
      b = int'(data_addr >> 7); d = int'(data_dst);
      n_data++;
      check(b < NB && want[d][b] > got[d][b], "data response answers an outstanding request");
      if (b < NB) begin
        got[d][b]++;
        check(int'(data_src) == owner_of(b), $sformatf("data for block %0d from its owner (%0d, owner %0d)",
                                                     b, data_src, owner_of(b)));
      end
    end
    for (int n = 0; n < N; n++) begin
      if (filtered[n]) n_filtered++;
      if (rel_valid[n]) n_rel++;
    end
  end

  // ---------------- processor-side helpers ----------------
  task automatic local_ev(input int n, input coh_event_e e, input int b, output am_state_e st);
    @(negedge clk);
    loc_valid[n] = 1; loc_event[n] = e; loc_addr[n] = blk(b);
    @(posedge clk);
    while (!loc_ready[n]) @(posedge clk);
    #1 loc_valid[n] = 0;
    while (!loc_done[n]) @(posedge clk);
    #1;
    check(loc_ok[n], "local event applied");
    st = loc_state[n];
  endtask

  task automatic bus_req(input int n, input bus_req_e ty, input int b);
    @(negedge clk);
    breq_valid[n] = 1; breq_type[n] = ty; breq_addr[n] = blk(b) | AW'(n);
    @(posedge clk);
    while (!breq_done[n]) @(posedge clk);
    @(negedge clk) breq_valid[n] = 0;
  endtask

  task automatic wait_data(input int n, input int b);
    while (got[n][b] < want[n][b]) @(posedge clk);
  endtask

  // quiet: no RFQ entry anywhere for a while
  task automatic settle();
    int quiet;
    quiet = 0;
    while (quiet < 40) begin
      bit busy;
      @(posedge clk);
      busy = 0;
      for (int n = 0; n < N; n++) if (rfq_count[n] != 0) busy = 1;
      quiet = busy ? 0 : quiet + 1;
    end
  endtask

  // read miss of node n on block b (b has an owner)
  task automatic read_miss(input int n, input int b);
    am_state_e st;
    int o;
    o = owner_of(b);
    want[n][b]++;
    bus_req(n, REQ_READ, b);
    wait_data(n, b);
    if (gold[o][b] == ST_EXL) begin gold[o][b] = ST_SHO; n_exl2sho++; end
    local_ev(n, EV_PR, b, st);
    check(st == ST_SHN, "read miss brings the block in SHN");
    gold[n][b] = ST_SHN;
  endtask

  // write by node n on block b
  task automatic write_op(input int n, input int b);
    am_state_e st;
    if (gold[n][b] == ST_INV) begin
      if (owner_of(b) >= 0) want[n][b]++;
      bus_req(n, REQ_WRITE, b);
      wait_data(n, b);
      n_wmiss++;
    end else if (gold[n][b] != ST_EXL) begin
      bus_req(n, REQ_INV, b);
      n_upgrade++;
    end
    for (int m = 0; m < N; m++) if (m != n) begin
      if (gold[m][b] != ST_INV) n_inv++;
      gold[m][b] = ST_INV;
    end
    local_ev(n, EV_PW, b, st);
    check(st == ST_EXL, "write leaves the block EXL");
    gold[n][b] = ST_EXL;
  endtask

  // ---------------- main sequence ----------------
  initial begin
    am_state_e st;
    rst_n = 0;
    for (int n = 0; n < N; n++) begin
      breq_valid[n] = 0; breq_type[n] = REQ_READ; breq_addr[n] = '0;
      loc_valid[n] = 0; loc_event[n] = EV_PR; loc_addr[n] = '0;
      for (int b = 0; b < NB; b++) begin gold[n][b] = ST_INV; want[n][b] = 0; got[n][b] = 0; end
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (init_done);
    $display("state and tag memories swept after %0d cycles", cycle);

    // 1. initial owners
    for (int b = 0; b < NB; b++) begin
      int n;
      n = int'($urandom % N);
      local_ev(n, EV_NNOC, b, st);
      check(st == ST_EXL, "relocated last copy arrives EXL");
      gold[n][b] = ST_EXL;
    end

    // 2. sequential operations
    for (int i = 0; i < SEQ_OPS; i++) begin
      int unsigned r;
      int n, b;
      r = $urandom;
      n = int'(r[15:0]) % N; b = int'(r[31:20]) % NB;
      case (r[18:16])
        0, 1, 2: if (gold[n][b] == ST_INV) read_miss(n, b);
        3, 4, 5: write_op(n, b);
        default: begin
          int rel_before;
          rel_before = n_rel;
          bus_req(n, REQ_RELOCATE, b);
          @(posedge clk); #1;
          check(n_rel - rel_before == N - 1, "relocation handed to every other node");
        end
      endcase
      settle();
    end

    // 3. concurrent read-miss bursts
    for (int k = 0; k < BURSTS; k++) begin
      for (int n = 0; n < N; n++) begin
        fork
          automatic int nn = n;
          begin
            for (int j = 0; j < 3; j++) begin
              int b;
              b = int'(($urandom >> 3) % NB);
              if (gold[nn][b] == ST_INV) read_miss(nn, b);
            end
          end
        join_none
      end
      wait fork;
      settle();
      // make some fresh exclusive owners for the next burst
      for (int j = 0; j < 2; j++) write_op(int'(($urandom >> 5) % N), int'(($urandom >> 9) % NB));
      settle();
    end

    // 4. read back every valid copy
    for (int n = 0; n < N; n++)
      for (int b = 0; b < NB; b++)
        if (gold[n][b] != ST_INV) begin
          local_ev(n, EV_PR, b, st);
          check(st == gold[n][b], $sformatf("node %0d block %0d state %0d, expected %0d", n, b, st, gold[n][b]));
        end
    for (int n = 0; n < N; n++)
      for (int b = 0; b < NB; b++)
        check(got[n][b] == want[n][b], "every requested block delivered once");

    $display("cycles=%0d transactions=%0d retries=%0d prb_holds=%0d data=%0d filtered=%0d relocations=%0d exl2sho=%0d invalidated=%0d wmiss=%0d upgrades=%0d",
             cycle, txn_count, retry_count, prb_hold_count, n_data, n_filtered, n_rel,
             n_exl2sho, n_inv, n_wmiss, n_upgrade);
    check(retry_count > 0, "NAK and retry happened");
    check(prb_hold_count > 0, "pending read buffer held a request");
    check(n_data > 0, "owners supplied data");
    check(n_exl2sho > 0, "EXL -> SHO on a bus read");
    check(n_filtered > 0, "requests filtered by ownership");
    check(n_rel > 0, "relocation handed over");
    check(n_inv > 0 && n_wmiss > 0 && n_upgrade > 0, "write misses, upgrades and invalidations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    wait (cycle == MAX_CYCLES);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
