// tb_state_tag_storage: random look-ups and state writes on a small STM
// (64 sets, 4 ways) against a behavioural model of the set-associative
// directory. Checks the response latency (exactly ACCESS_CYCLES), the
// post-reset sweep time, hits/ways/states, installation into a free way,
// refusal when a set is full, and that invalidating an absent block is
// a no-op.
module tb_state_tag_storage;
  import coma_pkg::*;
  localparam int AW = 40, BB = 128, WAYS = 4, SETS = 64, LAT = 4;
  localparam longint AMB = longint'(BB) * WAYS * SETS;

  logic clk = 0, rst_n = 0;
  logic init_done, req_valid, req_ready, req_set, resp_valid;
  logic [AW-1:0] req_addr;
  am_state_e req_state;
  lookup_t resp;
  int checks = 0, failures = 0;
  int n_hit = 0, n_full = 0, n_install = 0;

  state_tag_storage #(.ADDR_W(AW), .BLOCK_BYTES(BB), .WAYS(WAYS), .AM_BYTES(AMB),
                      .ACCESS_CYCLES(LAT)) dut (.*);

  always #5 clk = ~clk;

  // model: tag and state of each way of each set
  int unsigned m_tag [SETS][WAYS];
  am_state_e   m_st  [SETS][WAYS];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic access(input bit set, input int unsigned idx, input int unsigned tag,
                        input am_state_e st, output lookup_t r, output int lat);
    @(negedge clk);
    req_valid = 1; req_set = set; req_state = st;
    req_addr  = {AW'(tag) << 13} | (AW'(idx) << 7) | AW'($urandom % 128);
    check(req_ready, "ready when idle");
    @(posedge clk); #1;
    req_valid = 0;
    lat = 0;
    while (!resp_valid) begin @(posedge clk); #1; lat++; end
    r = resp;
  endtask

  initial begin
    int lat, cyc;
    lookup_t r;
    req_valid = 0; req_set = 0; req_addr = '0; req_state = ST_INV;
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) begin
      m_tag[s][w] = 0; m_st[s][w] = ST_INV;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    cyc = 0;
    while (!init_done) begin @(posedge clk); #1; cyc++; end
    check(cyc == SETS, $sformatf("sweep takes SETS cycles (%0d)", cyc));

    for (int i = 0; i < 3000; i++) begin
      int unsigned idx, tag;
      bit set, e_hit, e_free;
      int e_way, free_way;
      am_state_e st;
      idx = $urandom % 4;     // few sets: they fill up
      tag = $urandom % 8;
      set = 1'($urandom % 2);
      st  = am_state_e'($urandom % 4);
      e_hit = 0; e_way = 0; e_free = 0; free_way = 0;
      for (int w = WAYS - 1; w >= 0; w--) begin
        if (m_st[idx][w] != ST_INV && m_tag[idx][w] == tag) begin e_hit = 1; e_way = w; end
        if (m_st[idx][w] == ST_INV) begin e_free = 1; free_way = w; end
      end
      access(set, idx, tag, st, r, lat);
      check(lat == LAT, $sformatf("latency %0d", lat));
      if (!set) begin
        check(r.hit == e_hit, "lookup hit");
        if (e_hit) begin
          n_hit++;
          check(r.way == 2'(e_way) && r.state == m_st[idx][e_way], "lookup way/state");
        end else check(r.state == ST_INV, "miss reads INV");
      end else begin
        if (e_hit) begin
          check(r.hit && r.way == 2'(e_way) && r.state == st, "update present block");
          m_st[idx][e_way] = st;
        end else if (st != ST_INV && e_free) begin
          n_install++;
          check(r.hit && r.way == 2'(free_way) && r.state == st, "install in free way");
          m_st[idx][free_way] = st; m_tag[idx][free_way] = tag;
        end else begin
          if (st != ST_INV) n_full++;
          check(!r.hit, "no write (set full or INV of absent block)");
        end
      end
    end
    $display("hits=%0d installs=%0d set_full=%0d", n_hit, n_install, n_full);
    check(n_hit > 0 && n_install > 0 && n_full > 0, "hit, install and set-full all seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
