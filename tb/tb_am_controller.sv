// tb_am_controller: runs the request handler against a behavioural state and
// tag memory (fixed latency, random ready delays, always room to install)
// with a random stream of queued bus requests and local protocol events on a
// pool of eight blocks. For every finished job it checks, against a shadow
// directory kept by the testbench:
//   * Provide_Data is issued exactly when this node owned the block (EXL/SHO)
//     for a READ or WRITE, with the right address and destination;
//   * the resulting state (EXL->SHO on a read, INV on write/invalidate,
//     protocol table for local events);
//   * the number of state and tag memory accesses: one look-up only for a
//     request that needs no action (ownership filtering), no look-up for an
//     invalidation, no write when the state does not change.
module tb_am_controller;
  import coma_pkg::*;
  localparam int AW = 40, SW = 4, LAT = 3;

  logic clk = 0, rst_n = 0;
  logic rfq_empty, rfq_pop;
  bus_req_e rfq_type;
  logic [AW-1:0] rfq_addr, loc_addr, st_req_addr, pd_addr;
  logic [SW-1:0] rfq_src, pd_dst;
  logic loc_valid, loc_ready, loc_done, loc_ok;
  coh_event_e loc_event;
  am_state_e loc_state, st_req_state;
  logic st_init_done, st_req_valid, st_req_ready, st_req_set, st_resp_valid;
  lookup_t st_resp;
  logic pd_valid, pd_ready, filtered;

  am_controller #(.ADDR_W(AW), .SRC_W(SW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  function automatic logic [AW-1:0] blk_addr(input int b);
    return AW'(b) << 20 | AW'(b * 128);
  endfunction

  // hand-written protocol table
  function automatic am_state_e nxt(input am_state_e s, input coh_event_e e);
    case (e)
      EV_PR:   return (s == ST_INV) ? ST_SHN : s;
      EV_PW:   return ST_EXL;
      EV_NTO:  return (s == ST_SHN) ? ST_SHO : s;
      EV_NNOC: return ST_EXL;
      default: return s;
    endcase
  endfunction

  // ---------- behavioural STM ----------
  am_state_e dir [logic [AW-1:0]];
  int busy_cnt = 0, accesses = 0, sets = 0;
  logic pend_set; logic [AW-1:0] pend_addr; am_state_e pend_state;
  assign st_init_done = rst_n;
  always @(posedge clk) begin
    st_resp_valid <= 1'b0;
    if (!rst_n) begin
      busy_cnt <= 0; st_resp <= '0;
    end else if (busy_cnt > 0) begin
      if (busy_cnt == 1) begin
        am_state_e cur;
        cur = dir.exists(pend_addr) ? dir[pend_addr] : ST_INV;
        st_resp_valid <= 1'b1;
        if (pend_set) begin
          dir[pend_addr] = pend_state;
          st_resp <= '{hit: 1'b1, way: 2'd0, state: pend_state};
        end else
          st_resp <= '{hit: cur != ST_INV, way: 2'd0, state: cur};
      end
      busy_cnt <= busy_cnt - 1;
    end else if (st_req_valid && st_req_ready) begin
      busy_cnt <= LAT; accesses++; if (st_req_set) sets++;
      pend_set <= st_req_set; pend_addr <= st_req_addr; pend_state <= st_req_state;
    end
  end
  always @(negedge clk) st_req_ready = rst_n && busy_cnt == 0 && ($urandom % 4 != 0);

  // ---------- RFQ model ----------
  typedef struct { bus_req_e ty; logic [AW-1:0] a; logic [SW-1:0] s; } ent_t;
  ent_t q [$];
  assign rfq_empty = (q.size() == 0);
  always_comb begin
    rfq_type = q.size() ? q[0].ty : REQ_READ;
    rfq_addr = q.size() ? q[0].a : '0;
    rfq_src  = q.size() ? q[0].s : '0;
  end

  // ---------- Provide_Data sink ----------
  int pd_count = 0; logic [AW-1:0] pd_last_addr; logic [SW-1:0] pd_last_dst;
  always @(negedge clk) pd_ready = ($urandom % 3 != 0);
  always @(posedge clk) if (pd_valid && pd_ready) begin
    pd_count++; pd_last_addr = pd_addr; pd_last_dst = pd_dst;
  end

  // ---------- job checker ----------
  am_state_e shadow [8];
  coh_event_e loc_ev_q; int loc_b_q;
  int filt_pulses = 0;
  always @(posedge clk) if (rst_n && filtered) filt_pulses++;
  int n_provide = 0, n_filter = 0, n_local = 0, n_inv = 0, n_exl2sho = 0, n_jobs = 0;
  // rfq_pop and loc_done are sampled as they were in the cycle that ends here,
  // as the queue sees them; the RFQ model drops its head at this edge
  always @(posedge clk) if (rst_n) begin
    bit popped, ldone;
    popped = rfq_pop; ldone = loc_done;
    #1;
    if (popped) begin
      ent_t e; int b; am_state_e pre, post; bit own; int exp_acc;
      e = q.pop_front();
      b = int'(e.a >> 20);
      pre = shadow[b];
      own = (pre == ST_EXL || pre == ST_SHO);
      case (e.ty)
        REQ_READ:  begin post = (pre == ST_EXL) ? ST_SHO : pre;
                         exp_acc = (pre == ST_EXL) ? 2 : 1; end
        REQ_WRITE: begin post = ST_INV; exp_acc = (pre == ST_INV) ? 1 : 2; end
        default:   begin post = ST_INV; exp_acc = 1; n_inv++; end
      endcase
      if (e.ty != REQ_INV && own) begin
        n_provide++;
        check(pd_count == 1 && pd_last_addr == e.a && pd_last_dst == e.s, "Provide_Data by owner");
      end else check(pd_count == 0, "no Provide_Data by non-owner");
      if (e.ty == REQ_READ && pre == ST_EXL) n_exl2sho++;
      if (e.ty != REQ_INV && (pre == ST_INV || (e.ty == REQ_READ && pre == ST_SHN))) n_filter++;
      check(accesses == exp_acc, $sformatf("STM accesses %0d, expected %0d (type %0d pre %0d)",
                                           accesses, exp_acc, e.ty, pre));
      check((dir.exists(e.a) ? dir[e.a] : ST_INV) == post, "state after bus request");
      shadow[b] = post;
      accesses = 0; pd_count = 0; n_jobs++;
    end
    if (ldone) begin
      am_state_e pre, post;
      pre = shadow[loc_b_q];
      post = nxt(pre, loc_ev_q);
      check(loc_ok && loc_state == post, "local event result");
      check(accesses == ((post != pre) ? 2 : 1), "local event accesses");
      check((dir.exists(blk_addr(loc_b_q)) ? dir[blk_addr(loc_b_q)] : ST_INV) == post, "state after local event");
      check(pd_count == 0, "no data for local event");
      shadow[loc_b_q] = post;
      accesses = 0; pd_count = 0; n_local++; n_jobs++;
    end
  end

  // ---------- stimulus ----------
  initial begin
    loc_valid = 0; loc_event = EV_PR; loc_addr = '0;
    foreach (shadow[b]) shadow[b] = ST_INV;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    fork
      for (int i = 0; i < 4000; i++) begin  // bus requests
        int unsigned r;
        @(negedge clk);
        r = $urandom;
        if (q.size() < 4 && r[1:0] != 0) begin
          ent_t e;
          e.ty = bus_req_e'(r[3:2] == 3 ? 0 : r[3:2]);
          e.a  = blk_addr(int'(r[6:4]));
          e.s  = SW'(r[10:7]);
          q.push_back(e);
        end
      end
      for (int i = 0; i < 300; i++) begin   // local events
        int unsigned r;
        @(negedge clk);
        r = $urandom;
        repeat (r[3:0]) @(negedge clk);
        loc_valid = 1;
        loc_event = coh_event_e'(r[5:4] == 0 ? EV_PR : r[5:4] == 1 ? EV_PW :
                                 r[5:4] == 2 ? EV_NTO : EV_NNOC);
        if (r[7:6] == 0) loc_event = EV_PW;
        loc_b_q  = int'(r[10:8]);
        loc_addr = blk_addr(loc_b_q);
        loc_ev_q = loc_event;
        @(posedge clk);
        while (!loc_ready) @(posedge clk);
        #1 loc_valid = 0;
        while (!loc_done) @(posedge clk);
      end
    join
    while (q.size() > 0) @(posedge clk);
    repeat (20) @(posedge clk);
    $display("jobs=%0d provide=%0d filtered=%0d local=%0d inv=%0d exl2sho=%0d",
             n_jobs, n_provide, n_filter, n_local, n_inv, n_exl2sho);
    check(filt_pulses == n_filter, "filtered strobe per dropped request");
    check(n_provide > 0 && n_filter > 0 && n_local > 0 && n_inv > 0 && n_exl2sho > 0,
          "every kind of job seen");
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
