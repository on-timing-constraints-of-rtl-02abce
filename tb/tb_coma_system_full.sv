// tb_coma_system_full: the multiprocessor at its default size (16 nodes,
// 256 MB 4-way attraction memory per node, i.e. 2^19 sets of state and tag
// storage each, 4-cycle storage, 4-entry RFQs, 8-entry pending read buffer).
// After the 2^19-cycle sweep of the state and tag memories,
// coma_system_driver runs a shorter mix of sequential operations and
// concurrent read-miss bursts and checks coherence and every mechanism.
module tb_coma_system_full;
  import coma_pkg::*;
  localparam int N = 16, AW = 40, SW = 4, QD = 4, PD = 8;

  logic clk, rst_n, init_done;
  logic breq_valid [N], breq_done [N], breq_retry [N];
  bus_req_e breq_type [N];
  logic [AW-1:0] breq_addr [N], loc_addr [N], rel_addr [N];
  logic loc_valid [N], loc_ready [N], loc_done [N], loc_ok [N];
  coh_event_e loc_event [N];
  am_state_e loc_state [N];
  logic data_valid;
  logic [AW-1:0] data_addr;
  logic [SW-1:0] data_src, data_dst, rel_src [N];
  logic rel_valid [N], filtered [N];
  bus_phase_e bus_phase;
  logic bus_nak_any;
  logic [31:0] txn_count, retry_count, prb_hold_count;
  logic [$clog2(PD+1)-1:0] prb_used;
  logic [15:0] nak_count [N];
  logic [$clog2(QD+1)-1:0] rfq_count [N];

  coma_system dut (.*);

  coma_system_driver #(.N(N), .AW(AW), .SW(SW), .QD(QD), .PD(PD), .NB(24),
                       .SEQ_OPS(80), .BURSTS(6), .MAX_CYCLES(1000000)) drv (.*);
endmodule
