// tb_snooper: drives random five-phase bus transactions (own and foreign
// issuers, all request types, RFQ full or not, NAK from some other node or
// not) and checks the ok/error verdict, the relocation bypass and that a
// request is written into the RFQ exactly when it was accepted by every node.
// Also checks the snoop turn-around: the verdict is ready in the cycle after
// ADDR, two cycles before the ACK phase ends.
module tb_snooper;
  import coma_pkg::*;
  localparam int AW = 40, SW = 4, ID = 5;

  logic clk = 0, rst_n = 0;
  bus_phase_e bus_phase;
  bus_req_e bus_type, push_type;
  logic [AW-1:0] bus_addr, push_addr, rel_addr;
  logic [SW-1:0] bus_src, push_src, rel_src;
  logic bus_nak_any, ok_valid, ok, rfq_full, rfq_push, rel_valid;
  int checks = 0, failures = 0;
  int n_push = 0, n_nak = 0, n_rel = 0, n_drop = 0;

  snooper #(.ADDR_W(AW), .SRC_W(SW), .NODE_ID(ID)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    bus_phase = PH_IDLE; bus_type = REQ_READ; bus_addr = '0; bus_src = '0;
    bus_nak_any = 0; rfq_full = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      bus_req_e ty;
      logic [AW-1:0] a;
      logic [SW-1:0] s;
      bit full, other_nak, foreign, exp_ok, exp_push;
      int unsigned r;
      r  = $urandom;
      ty = bus_req_e'(r[1:0]);
      a  = {8'($urandom), 32'($urandom)};
      s  = (r[4:2] == 0) ? SW'(ID) : SW'(r[8:5]);
      full = (r[10:9] == 0);
      other_nak = (r[13:11] == 0);
      foreign = (s != SW'(ID));
      exp_ok = !foreign || ty == REQ_RELOCATE || !full;
      // ARB, RES
      @(negedge clk) bus_phase = PH_ARB;
      @(negedge clk) bus_phase = PH_RES;
      @(negedge clk) begin
        bus_phase = PH_ADDR; bus_type = ty; bus_addr = a; bus_src = s; rfq_full = full;
      end
      @(negedge clk) begin
        bus_phase = PH_DEC; bus_addr = '1; rfq_full = ($urandom % 2);  // address gone
        check(ok_valid && ok == exp_ok, "verdict ready one cycle after ADDR");
      end
      @(negedge clk) begin
        bus_phase = PH_ACK;
        bus_nak_any = other_nak || !exp_ok;
        if (!exp_ok) n_nak++;
        exp_push = foreign && ty != REQ_RELOCATE && exp_ok && !bus_nak_any;
        #1;
        check(ok_valid && ok == exp_ok, "verdict held in ACK");
        check(rfq_push == exp_push, "RFQ write only when accepted by all");
        check(rel_valid == (foreign && ty == REQ_RELOCATE && !bus_nak_any), "relocation strobe");
        if (rel_valid) begin
          n_rel++;
          check(rel_addr == a && rel_src == s, "relocation address/source");
        end
        if (exp_push) begin
          n_push++;
          check(push_type == ty && push_addr == a && push_src == s, "queued entry");
        end else if (foreign && ty != REQ_RELOCATE && exp_ok) n_drop++;
      end
      @(negedge clk) begin
        bus_phase = PH_IDLE; bus_nak_any = 0;
        check(!ok_valid && !rfq_push && !rel_valid, "idle after ACK");
      end
    end
    $display("push=%0d nak=%0d rel=%0d drop=%0d", n_push, n_nak, n_rel, n_drop);
    check(n_push > 0 && n_nak > 0 && n_rel > 0 && n_drop > 0, "all cases seen");
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
