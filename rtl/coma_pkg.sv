// coma_pkg: types and constants shared by the relaxed-snooping COMA node and
// its global bus.
//
// The attraction memory (AM) of each node is a 4-way set-associative cache of
// the global address space: 256 MB per node, 128-byte blocks, 40-bit physical
// addresses and a 2-bit coherence state. That gives 2^19 sets and a 14-bit tag
// (40 - 7 - 19), i.e. 16 bits of state and tag per block and 32 Mbit per node.
// These sizes and the four states INV/SHN/SHO/EXL follow the source design;
// the bit encodings of the states and request types are this design's choice.
package coma_pkg;

  // Coherence state of an AM block (Fig. 4 protocol).
  typedef enum logic [1:0] {
    ST_INV = 2'd0,  // invalid
    ST_SHN = 2'd1,  // shared, non-owner
    ST_SHO = 2'd2,  // shared, owner
    ST_EXL = 2'd3   // exclusive (only copy, owner)
  } am_state_e;

  // Bus request types seen by the snooper.
  typedef enum logic [1:0] {
    REQ_READ     = 2'd0,
    REQ_WRITE    = 2'd1,  // read with intent to write (read-exclusive)
    REQ_INV      = 2'd2,  // invalidation (upgrade from a shared copy)
    REQ_RELOCATE = 2'd3   // relocation of a last copy on replacement
  } bus_req_e;

  // Events of the coherence protocol (Fig. 4).
  typedef enum logic [2:0] {
    EV_PR   = 3'd0,  // processor read
    EV_PW   = 3'd1,  // processor write
    EV_NR   = 3'd2,  // network (bus) read
    EV_NW   = 3'd3,  // network write
    EV_NI   = 3'd4,  // network invalidation
    EV_NTO  = 3'd5,  // network transfer of ownership
    EV_NNOC = 3'd6   // network no other copy (relocated last copy)
  } coh_event_e;

  // Phases of one bus transaction (Fig. 3).
  typedef enum logic [2:0] {
    PH_IDLE = 3'd0,
    PH_ARB  = 3'd1,
    PH_RES  = 3'd2,
    PH_ADDR = 3'd3,
    PH_DEC  = 3'd4,
    PH_ACK  = 3'd5
  } bus_phase_e;

  // Outcome of a state and tag look-up.
  typedef struct packed {
    logic      hit;    // 0: DONT_HAVE
    logic [1:0] way;
    am_state_e state;  // ST_INV when not hit
  } lookup_t;

endpackage
