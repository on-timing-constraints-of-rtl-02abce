// tb_bus_driver: checks that the snooper's verdict becomes ACK or NAK only
// in the ACK phase, that NAKs are counted, and that Provide_Data requests are
// buffered, offered on the data-response channel until granted (with random
// grant delays) and accepted again once the buffer is free.
module tb_bus_driver;
  import coma_pkg::*;
  localparam int AW = 40, SW = 4;

  logic clk = 0, rst_n = 0;
  bus_phase_e bus_phase;
  logic ok_valid, ok, ack, nak, pd_valid, pd_ready, resp_req, resp_gnt;
  logic [AW-1:0] pd_addr, resp_addr;
  logic [SW-1:0] pd_dst, resp_dst;
  logic [15:0] nak_count;
  int checks = 0, failures = 0, naks = 0, sent = 0;

  bus_driver #(.ADDR_W(AW), .SRC_W(SW), .CNT_W(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // snoop-answer part
  initial begin
    bus_phase = PH_IDLE; ok_valid = 0; ok = 0;
    pd_valid = 0; pd_addr = '0; pd_dst = '0; resp_gnt = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      bit v;
      v = 1'($urandom % 2);
      @(negedge clk) bus_phase = PH_ADDR;
      @(negedge clk) begin bus_phase = PH_DEC; ok_valid = 1; ok = v; #1;
        check(!ack && !nak, "silent in DEC"); end
      @(negedge clk) begin bus_phase = PH_ACK; #1;
        check(ack == v && nak == !v, "ACK/NAK in ACK phase");
        if (!v) naks++; end
      @(negedge clk) begin bus_phase = PH_ARB; ok_valid = 0; #1;
        check(!ack && !nak, "silent outside ACK");
        check(nak_count == 16'(naks), "NAK counter"); end
    end
    wait (sent == 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // data-supply part: producer
  logic [AW-1:0] exp_addr [$];
  logic [SW-1:0] exp_dst [$];
  initial begin
    wait (rst_n);
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      pd_valid = 1; pd_addr = {8'($urandom), 32'($urandom)}; pd_dst = SW'($urandom);
      @(posedge clk);
      while (!pd_ready) @(posedge clk);
      exp_addr.push_back(pd_addr); exp_dst.push_back(pd_dst);
      @(negedge clk) pd_valid = 0;
      repeat ($urandom % 3) @(negedge clk);
    end
  end

  // data-supply part: bus grants
  always @(negedge clk) begin
    if (rst_n) begin
      if (resp_gnt && resp_req) begin end
      resp_gnt = resp_req && ($urandom % 3 == 0);
      if (resp_gnt) begin
        check(exp_addr.size() > 0, "response has a request");
        if (exp_addr.size() > 0) begin
          check(resp_addr == exp_addr[0] && resp_dst == exp_dst[0], "response contents");
          void'(exp_addr.pop_front()); void'(exp_dst.pop_front());
        end
        sent++;
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
