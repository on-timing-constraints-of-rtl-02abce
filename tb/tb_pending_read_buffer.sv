// tb_pending_read_buffer: random inserts, releases and look-ups on a small
// table (4 entries, 4 look-up ports) against a model that counts pending
// requests per block. Addresses differ inside a block to check that
// matching is done at block granularity.
module tb_pending_read_buffer;
  localparam int AW = 40, BB = 128, D = 4, NP = 4;

  logic clk = 0, rst_n = 0;
  logic ins_valid, rel_valid, full;
  logic [AW-1:0] ins_addr, rel_addr;
  logic [AW-1:0] chk_addr [NP];
  logic blocked [NP];
  logic [$clog2(D+1)-1:0] used;
  int checks = 0, failures = 0, n_full = 0, n_block = 0;
  int pend [8];   // pending entries per block of the pool

  pending_read_buffer #(.ADDR_W(AW), .BLOCK_BYTES(BB), .DEPTH(D), .NPORT(NP)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  function automatic logic [AW-1:0] addr_of(input int b, input int unsigned off);
    return (AW'(b) * 40'h23_4567_0000 + 40'h80_0000_0000) | AW'(off % BB);
  endfunction

  initial begin
    ins_valid = 0; rel_valid = 0; ins_addr = '0; rel_addr = '0;
    foreach (chk_addr[p]) chk_addr[p] = '0;
    foreach (pend[b]) pend[b] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int unsigned r;
      int total, bi, br;
      @(negedge clk);
      r = $urandom;
      total = 0;
      foreach (pend[b]) total += pend[b];
      check(used == ($clog2(D+1))'(total), "used count");
      check(full == (total == D), "full");
      if (full) n_full++;
      for (int p = 0; p < NP; p++) begin
        int cb;
        cb = ($urandom >> 4) % 8;
        chk_addr[p] = addr_of(cb, $urandom);
        #1;
        check(blocked[p] == (pend[cb] > 0), "blocked look-up");
        if (blocked[p]) n_block++;
      end
      bi = r[2:0]; br = r[5:3];
      ins_valid = r[7:6] != 0 && !full;
      ins_addr  = addr_of(bi, $urandom);
      rel_valid = r[9:8] == 0;
      rel_addr  = addr_of(br, $urandom);
      @(posedge clk); #1;
      if (rel_valid) pend[br] = 0;
      if (ins_valid) pend[bi]++;
      ins_valid = 0; rel_valid = 0;
    end
    check(n_full > 0 && n_block > 0, "full table and blocked requests seen");
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
