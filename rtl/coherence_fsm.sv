// coherence_fsm: next-state function of the four-state write-invalidate
// protocol of a bus-based COMA attraction memory.
//
// States are INV, SHN (shared non-owner), SHO (shared owner, other copies may
// exist) and EXL (only copy, owner). Local events are processor read (PR) and
// write (PW); bus-induced events are network read (NR), write (NW) and
// invalidation (NI); replacement-related events are transfer of ownership
// (NTO) and arrival of a relocated last copy (NNOC). The transitions follow the
// protocol diagram of the source design:
//   INV  --PR--> SHN     INV --PW--> EXL
//   SHN  --PR--> SHN     SHN --PW--> EXL   SHN --NW,NI--> INV   SHN --NTO--> SHO
//   SHO  --PR--> SHO     SHO --PW--> EXL   SHO --NW,NI--> INV
//   EXL  --PR,PW--> EXL  EXL --NR--> SHO   EXL --NW--> INV
//   any  --NNOC--> EXL
// Pairs the diagram leaves out are this design's choice: a bus read leaves a
// non-owner or SHO copy unchanged, an invalidation reaching EXL invalidates it
// (as the request handler does for every invalidation), bus events on INV stay
// INV, and NTO outside SHN changes nothing.
//
// Purely combinational: next_state is valid in the same cycle as the inputs.
module coherence_fsm
  import coma_pkg::*;
(
  input  am_state_e  state,
  input  coh_event_e ev,
  output am_state_e  next_state,
  output logic       changed      // next_state differs from state
);

  always_comb begin
    next_state = state;
    unique case (ev)
      EV_PR:   if (state == ST_INV) next_state = ST_SHN;
      EV_PW:   next_state = ST_EXL;
      EV_NR:   if (state == ST_EXL) next_state = ST_SHO;
      EV_NW:   next_state = ST_INV;
      EV_NI:   next_state = ST_INV;
      EV_NTO:  if (state == ST_SHN) next_state = ST_SHO;
      EV_NNOC: next_state = ST_EXL;
      default: next_state = state;
    endcase
    changed = (next_state != state);
  end

endmodule
