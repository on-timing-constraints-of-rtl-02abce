// tb_coherence_fsm: exhaustive check of the protocol next-state function
// against a hand-written table (rows: INV SHN SHO EXL; columns: PR PW NR NW
// NI NTO NNOC), plus the 'changed' flag.
module tb_coherence_fsm;
  import coma_pkg::*;

  am_state_e  state, next_state;
  coh_event_e ev;
  logic       changed;
  int checks = 0, failures = 0;

  coherence_fsm dut (.state, .ev, .next_state, .changed);

  // expected[state][event]
  am_state_e expected [4][7] = '{
    //   PR      PW      NR      NW      NI      NTO     NNOC
    '{ST_SHN, ST_EXL, ST_INV, ST_INV, ST_INV, ST_INV, ST_EXL},  // INV
    '{ST_SHN, ST_EXL, ST_SHN, ST_INV, ST_INV, ST_SHO, ST_EXL},  // SHN
    '{ST_SHO, ST_EXL, ST_SHO, ST_INV, ST_INV, ST_SHO, ST_EXL},  // SHO
    '{ST_EXL, ST_EXL, ST_SHO, ST_INV, ST_INV, ST_EXL, ST_EXL}   // EXL
  };

  initial begin
    for (int s = 0; s < 4; s++) begin
      for (int e = 0; e < 7; e++) begin
        state = am_state_e'(s);
        ev    = coh_event_e'(e);
        #1;
        checks++;
        if (next_state !== expected[s][e] || changed !== (expected[s][e] != am_state_e'(s))) begin
          failures++;
          $display("FAIL state=%0d ev=%0d next=%0d expected=%0d changed=%0b",
                   s, e, next_state, expected[s][e], changed);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
