// tb_coma_system: end-to-end run of the multiprocessor at reduced size
// (4 nodes, 64-set attraction memories, slow state and tag memory of 6
// cycles, 2-entry RFQs) under coma_system_driver, which plays the processors
// and checks coherence, data supply and every mechanism of the design.
module tb_coma_system;
  import coma_pkg::*;
  localparam int N = 4, AW = 40, SW = 2, QD = 2, PD = 4;

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

  coma_system #(.N_NODES(N), .ADDR_W(AW), .AM_BYTES(64'd32768), .ST_ACCESS_CYCLES(6),
                .RFQ_DEPTH(QD), .PRB_DEPTH(PD)) dut (.*);

  coma_system_driver #(.N(N), .AW(AW), .SW(SW), .QD(QD), .PD(PD), .NB(12),
                       .SEQ_OPS(200), .BURSTS(20), .MAX_CYCLES(200000)) drv (.*);
endmodule
