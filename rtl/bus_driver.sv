// bus_driver: drives one node's answers onto the global bus.
//
// Two duties, both from the source design's node organisation:
//  * Snoop answer. The ok/error verdict of the snooper is latched during the
//    DEC phase and driven as ACK or NAK during the ACK phase (time Tb). A NAK
//    makes the issuing node retry the transaction later.
//  * Data supply. When the cache/AM controller decides that this node owns a
//    requested block (Provide_Data), the request is held in a one-entry
//    buffer and offered to the bus's data-response channel until granted.
//    The block's bytes come from the AM data array, which is outside this RTL;
//    the response carries the block address and the destination node.
// The one-entry buffer, the response handshake and the counter of NAKs given
// are this design's choices.
//
// Timing: ack/nak are combinational in the ACK cycle from a flop set in DEC.
// pd_ready is high when the buffer is empty; a buffered response is presented
// from the next cycle on and leaves in the cycle resp_gnt is high.
module bus_driver
  import coma_pkg::*;
#(
  parameter int unsigned ADDR_W = 40,
  parameter int unsigned SRC_W  = 4,
  parameter int unsigned CNT_W  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  bus_phase_e        bus_phase,
  // from the snooper
  input  logic              ok_valid,
  input  logic              ok,
  // snoop answer lines (Tb)
  output logic              ack,
  output logic              nak,
  // Provide_Data from the controller
  input  logic              pd_valid,
  output logic              pd_ready,
  input  logic [ADDR_W-1:0] pd_addr,
  input  logic [SRC_W-1:0]  pd_dst,
  // data-response channel of the bus
  output logic              resp_req,
  output logic [ADDR_W-1:0] resp_addr,
  output logic [SRC_W-1:0]  resp_dst,
  input  logic              resp_gnt,
  // statistics
  output logic [CNT_W-1:0]  nak_count
);

  logic ans_valid, ans_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ans_valid <= 1'b0;
      ans_ok    <= 1'b0;
      nak_count <= '0;
    end else begin
      if (bus_phase == PH_DEC) begin
        ans_valid <= ok_valid;
        ans_ok    <= ok;
      end else if (bus_phase == PH_ACK) begin
        ans_valid <= 1'b0;
        if (nak) nak_count <= nak_count + 1'b1;
      end
    end
  end

  assign ack = (bus_phase == PH_ACK) && ans_valid && ans_ok;
  assign nak = (bus_phase == PH_ACK) && ans_valid && !ans_ok;

  // Provide_Data buffer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp_req  <= 1'b0;
      resp_addr <= '0;
      resp_dst  <= '0;
    end else if (pd_valid && pd_ready) begin
      resp_req  <= 1'b1;
      resp_addr <= pd_addr;
      resp_dst  <= pd_dst;
    end else if (resp_gnt) begin
      resp_req  <= 1'b0;
    end
  end

  assign pd_ready = !resp_req;

endmodule
