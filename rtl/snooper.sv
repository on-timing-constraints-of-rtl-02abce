// snooper: bus-side front end of one node in the relaxed snooping scheme.
//
// Instead of looking up the slow state and tag memory while the bus waits,
// the snooper only has to decide whether the request fits into the Request
// FIFO Queue (RFQ). This makes the snoop turn-around time depend on queue
// insertion alone. At the end of the bus ADDR phase (time Ta) it latches the
// request and reports ok (RFQ has room) or error (RFQ full) to the bus driver,
// which answers ACK or NAK in the ACK phase (time Tb). Relocation requests are
// not queued but handed straight to a relocation handler (rel_* outputs). The
// snooper ignores the transactions its own node issues.
//
// Follows the source design: queue-or-NAK, the relocation bypass, own-bus
// ordering. This design's choice: the latched request is only written into the
// RFQ at the end of the ACK phase, and only if no node on the bus answered NAK
// (bus_nak_any). A NAKed request is retried by its issuer, so committing it
// here too would queue it twice. A relocation is passed on under the same
// rule. Between ADDR and ACK the RFQ can only drain
// (one bus transaction is in flight at a time), so room seen at ADDR is still
// there at ACK.
//
// Timing: ok_valid/ok are registered at the end of ADDR and stay valid through
// DEC and ACK; rfq_push and rel_valid are combinational strobes during the
// ACK cycle.
module snooper
  import coma_pkg::*;
#(
  parameter int unsigned ADDR_W  = 40,
  parameter int unsigned SRC_W   = 4,
  parameter int unsigned NODE_ID = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  // global bus (snooped)
  input  bus_phase_e        bus_phase,
  input  bus_req_e          bus_type,
  input  logic [ADDR_W-1:0] bus_addr,
  input  logic [SRC_W-1:0]  bus_src,
  input  logic              bus_nak_any,
  // to the bus driver
  output logic              ok_valid,
  output logic              ok,
  // to the RFQ
  input  logic              rfq_full,
  output logic              rfq_push,
  output bus_req_e          push_type,
  output logic [ADDR_W-1:0] push_addr,
  output logic [SRC_W-1:0]  push_src,
  // to the relocation handler
  output logic              rel_valid,
  output logic [ADDR_W-1:0] rel_addr,
  output logic [SRC_W-1:0]  rel_src
);

  logic staged, rel_staged;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      staged     <= 1'b0;
      rel_staged <= 1'b0;
      ok_valid   <= 1'b0;
      ok         <= 1'b0;
      push_type <= REQ_READ;
      push_addr <= '0;
      push_src  <= '0;
      rel_addr  <= '0;
      rel_src   <= '0;
    end else begin
      if (bus_phase == PH_ADDR) begin
        ok_valid   <= 1'b1;
        rel_staged <= 1'b0;
        if (bus_src == SRC_W'(NODE_ID)) begin
          ok     <= 1'b1;              // own request: nothing to do
          staged <= 1'b0;
        end else if (bus_type == REQ_RELOCATE) begin
          ok         <= 1'b1;          // relocation: not queued
          staged     <= 1'b0;
          rel_staged <= 1'b1;
          rel_addr   <= bus_addr;
          rel_src    <= bus_src;
        end else begin
          ok        <= !rfq_full;      // Put_FIFO() succeeds?
          staged    <= !rfq_full;
          push_type <= bus_type;
          push_addr <= bus_addr;
          push_src  <= bus_src;
        end
      end else if (bus_phase == PH_ACK) begin
        ok_valid   <= 1'b0;
        staged     <= 1'b0;
        rel_staged <= 1'b0;
      end
    end
  end

  assign rfq_push  = (bus_phase == PH_ACK) && staged && !bus_nak_any;
  assign rel_valid = (bus_phase == PH_ACK) && rel_staged && !bus_nak_any;

endmodule
