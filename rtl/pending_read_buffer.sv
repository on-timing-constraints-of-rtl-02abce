// pending_read_buffer: bus-wide table of blocks with an outstanding data
// request (the "read resources" of the bus).
//
// A READ or WRITE that the bus has accepted waits for its owner node to
// supply the block. Until that happens no further request for the same block
// may come out on the bus. This keeps an owner's Request FIFO Queue from ever
// holding two requests for one block it owns, a property the relaxed snooping
// scheme relies on. The table and its role follow the source design; its size,
// the free-slot search and the release on the data response are this design's
// choices.
//
// Interface: ins_* records an accepted request (dropped, with an assertion, if
// the table is full; the bus stops issuing data requests while full is high);
// rel_* clears every entry of the block when its data response passes;
// chk_addr[i] -> blocked[i] tells, combinationally, whether requester i's
// block is pending. Addresses are compared at block granularity.
module pending_read_buffer #(
  parameter int unsigned ADDR_W      = 40,
  parameter int unsigned BLOCK_BYTES = 128,
  parameter int unsigned DEPTH       = 8,
  parameter int unsigned NPORT       = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ins_valid,
  input  logic [ADDR_W-1:0] ins_addr,
  input  logic              rel_valid,
  input  logic [ADDR_W-1:0] rel_addr,
  input  logic [ADDR_W-1:0] chk_addr [NPORT],
  output logic              blocked  [NPORT],
  output logic              full,
  output logic [$clog2(DEPTH+1)-1:0] used
);

  localparam int unsigned OFF_W = $clog2(BLOCK_BYTES);
  localparam int unsigned BLK_W = ADDR_W - OFF_W;

  logic             vld [DEPTH];
  logic [BLK_W-1:0] blk [DEPTH];

  function automatic logic [BLK_W-1:0] blk_of(input logic [ADDR_W-1:0] a);
    return a[ADDR_W-1:OFF_W];
  endfunction

  // lowest free slot
  logic                     has_free;
  logic [$clog2(DEPTH)-1:0] free_slot;
  always_comb begin
    has_free  = 1'b0;
    free_slot = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (!vld[i]) begin
        has_free  = 1'b1;
        free_slot = ($clog2(DEPTH))'(i);
      end
    end
  end

  always_comb begin
    used = '0;
    for (int i = 0; i < DEPTH; i++) used = used + ($clog2(DEPTH+1))'(vld[i]);
  end
  assign full = !has_free;

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      blocked[p] = 1'b0;
      for (int i = 0; i < DEPTH; i++)
        if (vld[i] && blk[i] == blk_of(chk_addr[p])) blocked[p] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        vld[i] <= 1'b0;
        blk[i] <= '0;
      end
    end else begin
      for (int i = 0; i < DEPTH; i++)
        if (rel_valid && vld[i] && blk[i] == blk_of(rel_addr)) vld[i] <= 1'b0;
      if (ins_valid && has_free) begin
        vld[free_slot] <= 1'b1;
        blk[free_slot] <= blk_of(ins_addr);
      end
    end
  end

  a_no_insert_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    ins_valid |-> has_free) else $error("pending_read_buffer: insert while full");

endmodule
