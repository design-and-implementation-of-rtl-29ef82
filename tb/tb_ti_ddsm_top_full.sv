// tb_ti_ddsm_top_full: the whole design at its default parameters (4 paths,
// inverse Chebyshev set, 65536-bit capture, 115200 baud at 66 MHz): one
// dithered run, one complete capture of 65536 output bits and its transfer
// over the RS232 line, every bit checked against the reference model.
module tb_ti_ddsm_top_full;

  logic clk, arst_n, dither_en, capture_start;
  logic ds_out, ds_valid, uart_txd, capture_busy, capture_done;

  ti_ddsm_top dut (
    .clk(clk), .arst_n(arst_n), .dither_en(dither_en), .capture_start(capture_start),
    .ds_out(ds_out), .ds_valid(ds_valid), .uart_txd(uart_txd),
    .capture_busy(capture_busy), .capture_done(capture_done));

  ddsm_stream_checker #(.PHASES(1), .WATCHDOG_NS(64'd1000000000)) chk (
    .clk(clk), .arst_n(arst_n), .dither_en(dither_en), .capture_start(capture_start),
    .ds_out(ds_out), .ds_valid(ds_valid), .uart_txd(uart_txd),
    .capture_busy(capture_busy), .capture_done(capture_done),
    .par_valid(dut.par_valid), .tx_stall(dut.tx_valid && !dut.tx_ready),
    .src_valid(dut.pair_valid));
endmodule
