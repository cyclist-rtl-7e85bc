// Full-size testbench: cyclist_array at its default 14 x 20 (280 tiles). The driver broadcasts a program,
// runs 20 target cycles with random edge gaps and back-pressure, and checks every edge word,
// the trace stream and a snapshot of every tile (see tb_array_driver). Per-tile events
// (stalls, multicasts, routed words, loads, stores, busy) are gathered here for it.
module tb_cyclist_array_full;
  import cyclist_pkg::*;
  localparam int R = 14, C = 20;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic [R-1:0] west_in_valid, west_in_ready, west_out_valid, west_out_ready;
  logic [R-1:0] east_in_valid, east_in_ready, east_out_valid, east_out_ready;
  logic [R-1:0][31:0] west_in_data, west_out_data, east_in_data, east_out_data;
  logic [C-1:0] north_in_valid, north_in_ready, north_out_valid, north_out_ready;
  logic [C-1:0] south_in_valid, south_in_ready, south_out_valid, south_out_ready;
  logic [C-1:0][31:0] north_in_data, north_out_data, south_in_data, south_out_data;
  dbg_pkt_t dbg_in, dbg_out;
  logic [R*C-1:0] ev_in_stall, ev_out_stall, ev_multicast, ev_route, ev_load, ev_store, ev_busy;

  cyclist_array dut (.*);

  for (genvar r = 0; r < R; r++) begin : g_r
    for (genvar c = 0; c < C; c++) begin : g_c
      localparam int P = r * C + c;
      assign ev_in_stall[P]  = dut.g_row[r].g_col[c].u_tile.rf_stall && !dut.g_row[r].g_col[c].u_tile.freeze;
      assign ev_out_stall[P] = dut.g_row[r].g_col[c].u_tile.wb_stall;
      assign ev_multicast[P] = $countones(dut.g_row[r].g_col[c].u_tile.outq_push) > 1;
      assign ev_route[P]     = dut.g_row[r].g_col[c].u_tile.outq_push != 0 &&
                               !dut.g_row[r].g_col[c].u_tile.wb_ctrl.out_result;
      assign ev_load[P]      = dut.g_row[r].g_col[c].u_tile.dmem_re;
      assign ev_store[P]     = dut.g_row[r].g_col[c].u_tile.dmem_we && !dut.g_row[r].g_col[c].u_tile.acc_valid;
      assign ev_busy[P]      = dut.g_row[r].g_col[c].u_tile.busy;
    end
  end

  tb_array_driver #(.R(R), .C(C), .K(20), .GAP(10), .BP(30)) drv (.*);

  initial begin
    #20000000;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", drv.checks, drv.failures + 1);
    $finish;
  end
endmodule
