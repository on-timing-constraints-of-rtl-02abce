// state_tag_storage: state and tag memory (STM) of one node's attraction
// memory, the copy used for snooping.
//
// The attraction memory is a WAYS-way set-associative cache of the global
// address space. For every block the STM keeps a tag and a 2-bit coherence
// state; the default geometry (256 MB per node, 4 ways, 128-byte blocks,
// 40-bit addresses: 2^19 sets, 14-bit tag, 32 Mbit in all) is the worked
// example of the source design. The point of the design is that this memory is
// large and therefore slow and cheap: every access here takes ACCESS_CYCLES
// clock cycles, a figure the source leaves open and this design assumes.
//
// Operations (one at a time, req_valid/req_ready handshake):
//   OP_LOOKUP : report whether the block is present (hit), in which way and in
//               which state. A present block in state INV is reported as a
//               miss (DONT_HAVE).
//   OP_SET    : write new_state for the block. If its tag is present that way
//               is updated; otherwise, for a state other than INV, the block is
//               installed in the lowest-numbered INV way. resp.hit tells whether
//               the write took place (0: set full, or INV for an absent block).
// Replacement of a valid block is outside the source design and is not done.
// WAYS may be at most 4 (the way number is 2 bits wide).
//
// Timing: the set is read in the cycle the request is accepted; resp_valid is
// high for one cycle ACCESS_CYCLES cycles later, when an OP_SET also writes.
// After reset the memory is swept to all-INV, one set per cycle; req_ready
// stays low and init_done low until the sweep ends (SETS cycles).
module state_tag_storage
  import coma_pkg::*;
#(
  parameter int unsigned ADDR_W        = 40,
  parameter int unsigned BLOCK_BYTES   = 128,
  parameter int unsigned WAYS          = 4,
  parameter longint unsigned AM_BYTES  = 64'd268435456,  // 256 MB
  parameter int unsigned ACCESS_CYCLES = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              init_done,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_set,    // 1: OP_SET, 0: OP_LOOKUP
  input  logic [ADDR_W-1:0] req_addr,
  input  am_state_e         req_state,
  output logic              resp_valid,
  output lookup_t           resp
);

  localparam int unsigned OFF_W  = $clog2(BLOCK_BYTES);
  localparam longint unsigned SETS = AM_BYTES / 64'(BLOCK_BYTES) / 64'(WAYS);
  localparam int unsigned IDX_W  = $clog2(SETS);
  localparam int unsigned TAG_W  = ADDR_W - OFF_W - IDX_W;
  localparam int unsigned CNT_W  = $clog2(ACCESS_CYCLES + 1);

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    am_state_e        st;
  } entry_t;

  entry_t mem [SETS][WAYS];

  // Sweep after reset
  logic [IDX_W:0] init_idx;
  assign init_done = init_idx[IDX_W];

  // Operation in progress
  logic             busy;
  logic [CNT_W-1:0] cnt;
  logic             op_set;
  logic [IDX_W-1:0] op_idx;
  logic [TAG_W-1:0] op_tag;
  am_state_e        op_state;
  entry_t           set_q [WAYS];

  assign req_ready = init_done && !busy;

  wire [IDX_W-1:0] req_idx = req_addr[OFF_W +: IDX_W];
  wire [TAG_W-1:0] req_tag = req_addr[ADDR_W-1 -: TAG_W];

  // Tag match and free-way search on the registered set
  logic             hit;
  logic [1:0]       hit_way;
  logic             free;
  logic [1:0]       free_way;
  always_comb begin
    hit = 1'b0; hit_way = '0; free = 1'b0; free_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (set_q[w].st != ST_INV && set_q[w].tag == op_tag) begin
        hit = 1'b1; hit_way = 2'(w);
      end
      if (set_q[w].st == ST_INV) begin
        free = 1'b1; free_way = 2'(w);
      end
    end
  end

  wire finish = busy && (cnt == CNT_W'(1));
  wire do_write = finish && op_set && (hit || (free && op_state != ST_INV));
  wire [1:0] wr_way = hit ? hit_way : free_way;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_idx   <= '0;
      busy       <= 1'b0;
      cnt        <= '0;
      resp_valid <= 1'b0;
      resp       <= '0;
    end else begin
      resp_valid <= 1'b0;
      if (!init_done) init_idx <= init_idx + 1'b1;
      if (req_valid && req_ready) begin
        busy <= 1'b1;
        cnt  <= CNT_W'(ACCESS_CYCLES);
      end else if (busy) begin
        cnt <= cnt - 1'b1;
        if (finish) begin
          busy       <= 1'b0;
          resp_valid <= 1'b1;
          if (op_set) begin
            resp.hit   <= do_write;
            resp.way   <= wr_way;
            resp.state <= do_write ? op_state : ST_INV;
          end else begin
            resp.hit   <= hit;
            resp.way   <= hit_way;
            resp.state <= hit ? set_q[hit_way].st : ST_INV;
          end
        end
      end
    end
  end

  // Memory array: one read (request) or one write (completion / sweep) per cycle
  always_ff @(posedge clk) begin
    if (!init_done) begin
      for (int w = 0; w < WAYS; w++) mem[init_idx[IDX_W-1:0]][w] <= '0;
    end else if (do_write) begin
      mem[op_idx][wr_way] <= '{tag: op_tag, st: op_state};
    end
    if (req_valid && req_ready) begin
      op_set   <= req_set;
      op_idx   <= req_idx;
      op_tag   <= req_tag;
      op_state <= req_state;
      for (int w = 0; w < WAYS; w++) set_q[w] <= mem[req_idx][w];
    end
  end

  // One access of ACCESS_CYCLES must finish before the next is accepted
  a_resp_only_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    (req_valid && req_ready) |-> !busy);

endmodule
