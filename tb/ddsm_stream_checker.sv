// ddsm_stream_checker: end-to-end stimulus and checker for ti_ddsm_top,
// shared by the reduced-size and the full-size testbenches.
//
// For each of PHASES runs (run 0 without dither, run 1 with dither) it
// resets the design through arst_n, then
//  * compares every bit of the full-rate output stream ds_out with the
//    single-path integer reference model fed with the reference LUT sinusoid
//    and the reference LFSR dither (first CHECK_BITS bits of each run);
//  * checks that the first output bit appears NPATHS + 2 clocks after the
//    first LUT sample (downsampler N, modulator 1, upsampler 1);
//  * checks that ds_valid, once high, stays high (one output bit per clock)
//    and that the path-rate enable comes exactly every NPATHS clocks;
//  * pulses capture_start, decodes the RS232 line (8N1, CPB clocks per bit)
//    and checks that the CAPTURE_BITS/8 bytes received are the stream bits
//    from the capture point on, earliest bit in bit 0 of each byte;
//  * counts how often each mechanism occurred (resets, dithered and
//    undithered samples, path-rate enables, captures, bytes, cycles in which
//    the capture buffer waited on the transmitter) and fails any that
//    never occurred.
// Ends with the TB_RESULT line and $finish; has its own watchdog.
module ddsm_stream_checker
  import ddsm_ref_pkg::*;
#(
  parameter int          NPATHS       = 4,
  parameter int          FILT         = 2,
  parameter int          AMP          = 16384,
  parameter int          CAPTURE_BITS = 65536,
  parameter int          CPB          = 573,
  parameter logic [15:0] SEED         = 16'hACE1,
  parameter int          PHASES       = 2,
  parameter longint      WATCHDOG_NS  = 64'd2000000000
) (
  output logic clk,
  output logic arst_n,
  output logic dither_en,
  output logic capture_start,
  input  logic ds_out,
  input  logic ds_valid,
  input  logic uart_txd,
  input  logic capture_busy,
  input  logic capture_done,
  input  logic par_valid,   // path-rate enable inside the design
  input  logic tx_stall,    // capture buffer offering a byte the UART cannot take yet
  input  logic src_valid    // first LUT sample of a run is on the source register
);

  localparam int CHECK_BITS = CAPTURE_BITS + 2000;

  int checks = 0, failures = 0;
  int n_resets = 0, n_plain = 0, n_dithered = 0, n_enables = 0;
  int n_captures = 0, n_bytes = 0, n_stalls = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial clk = 0;
  always #5 clk = ~clk;

  initial begin
    #(WATCHDOG_NS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- output stream monitor ----------------
  bit     running = 0;
  bit     stream [CHECK_BITS];
  int     n_ds;
  int     cap_idx;
  bit     cap_seen;
  bit     was_valid;
  int     since_en;
  int     clk_src, clk_ds;
  int     cyc;
  ef_ref   m;
  lfsr_ref l;

  always @(posedge clk) begin
    if (running) begin
      bit ey;
      cyc++;
      if (src_valid && clk_src < 0) clk_src = cyc;
      if (ds_valid && clk_ds < 0) begin
        clk_ds = cyc;
        check(clk_src >= 0 && clk_ds - clk_src == NPATHS + 2,
              $sformatf("latency %0d clocks", clk_ds - clk_src));
      end
      if (ds_valid) begin
        if (capture_busy && !cap_seen) begin
          cap_seen = 1;
          cap_idx  = n_ds;
        end
        if (n_ds < CHECK_BITS) begin
          ey = m.step(sine_ref(AMP, n_ds), l.dither(), dither_en);
          l.advance();
          check(ds_out == ey, $sformatf("stream bit %0d got %0b exp %0b", n_ds, ds_out, ey));
          stream[n_ds] = ds_out;
          if (dither_en) n_dithered++; else n_plain++;
        end
        n_ds++;
      end else begin
        check(!was_valid, "output stream continuous");
      end
      was_valid = ds_valid;
      if (par_valid) begin
        if (since_en > 0 && since_en != NPATHS) begin
          check(0, $sformatf("path enable spacing %0d", since_en));
        end
        n_enables++;
        since_en = 1;
      end else if (since_en > 0) begin
        since_en++;
      end
      if (tx_stall) n_stalls++;
    end
  end

  // ---------------- RS232 receiver ----------------
  byte unsigned rx [$];
  initial begin
    byte unsigned b;
    forever begin
      @(negedge uart_txd);
      if (arst_n) begin
        repeat (CPB / 2) @(posedge clk);
        #1 check(uart_txd == 0, "start bit");
        for (int i = 0; i < 8; i++) begin
          repeat (CPB) @(posedge clk);
          #1 b[i] = uart_txd;
        end
        repeat (CPB) @(posedge clk);
        #1 check(uart_txd == 1, "stop bit");
        rx.push_back(b);
        n_bytes++;
      end
    end
  end

  // ---------------- sequence ----------------
  initial begin
    byte unsigned expb;
    arst_n = 1; dither_en = 0; capture_start = 0;
    for (int ph = 0; ph < PHASES; ph++) begin
      @(negedge clk);
      arst_n = 0;
      running = 0;
      dither_en = (PHASES == 1) ? 1'b1 : 1'(ph);
      repeat (3) @(negedge clk);
      m = new(FILT);
      l = new(SEED);
      n_ds = 0; cap_seen = 0; was_valid = 0; since_en = 0;
      cyc = 0; clk_src = -1; clk_ds = -1;
      rx.delete();
      arst_n = 1;
      running = 1;
      n_resets++;
      repeat (200 + 37 * ph) @(negedge clk);
      capture_start = 1;
      @(negedge clk);
      capture_start = 0;
      @(posedge capture_done);
      n_captures++;
      repeat (12 * CPB) @(posedge clk);
      check(cap_seen, "capture began");
      check(rx.size() == CAPTURE_BITS / 8, $sformatf("received %0d bytes", rx.size()));
      for (int i = 0; i < rx.size() && i < CAPTURE_BITS / 8; i++) begin
        for (int k = 0; k < 8; k++) expb[k] = stream[cap_idx + 8 * i + k];
        check(rx[i] == expb, $sformatf("run %0d byte %0d got %h exp %h", ph, i, rx[i], expb));
      end
    end
    check(n_resets > 0, "resets");
    check(n_plain > 0 || PHASES == 1, "undithered samples");
    check(n_dithered > 0, "dithered samples");
    check(n_enables > 0, "path-rate enables");
    check(n_captures == PHASES, "captures");
    check(n_bytes == PHASES * CAPTURE_BITS / 8, "bytes sent");
    check(n_stalls > 0, "capture buffer waited on the transmitter");
    $display("mechanisms: resets=%0d plain=%0d dithered=%0d enables=%0d captures=%0d bytes=%0d stall_cycles=%0d",
             n_resets, n_plain, n_dithered, n_enables, n_captures, n_bytes, n_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
