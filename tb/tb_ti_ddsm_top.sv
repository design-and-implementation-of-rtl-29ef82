// tb_ti_ddsm_top: end-to-end test of the whole design at reduced capture
// size and baud divider (4 paths, inverse Chebyshev set, default amplitude
// and seed), one run without and one with dither. See ddsm_stream_checker
// for what is checked.
module tb_ti_ddsm_top;
  import ddsm_pkg::*;

  logic clk, arst_n, dither_en, capture_start;
  logic ds_out, ds_valid, uart_txd, capture_busy, capture_done;

  ti_ddsm_top #(.NPATHS(4), .FILTER(INV_CHEBYSHEV), .CAPTURE_BITS(1024), .CLKS_PER_BIT(16)) dut (
    .clk(clk), .arst_n(arst_n), .dither_en(dither_en), .capture_start(capture_start),
    .ds_out(ds_out), .ds_valid(ds_valid), .uart_txd(uart_txd),
    .capture_busy(capture_busy), .capture_done(capture_done));

  ddsm_stream_checker #(.NPATHS(4), .FILT(2), .CAPTURE_BITS(1024), .CPB(16), .PHASES(2),
                        .WATCHDOG_NS(64'd20000000)) chk (
    .clk(clk), .arst_n(arst_n), .dither_en(dither_en), .capture_start(capture_start),
    .ds_out(ds_out), .ds_valid(ds_valid), .uart_txd(uart_txd),
    .capture_busy(capture_busy), .capture_done(capture_done),
    .par_valid(dut.par_valid), .tx_stall(dut.tx_valid && !dut.tx_ready),
    .src_valid(dut.pair_valid));
endmodule
