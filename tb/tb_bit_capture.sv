// tb_bit_capture: records two blocks of 256 random bits (bit_valid with
// gaps) and drains them through a sink whose tx_ready comes at random.
// Checks that each byte offered holds bits 8i..8i+7 of the record, earliest
// bit in bit 0, that tx_data stays stable while offered, that bits arriving
// outside a capture are ignored, and the busy flags and the done pulse.
module tb_bit_capture;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NB = 256;
  logic clk = 0, rst = 1, start = 0, bit_in = 0, bit_valid = 0, tx_ready = 0;
  logic [7:0] tx_data;
  logic tx_valid, capturing, sending, done;
  always #5 clk = ~clk;

  bit_capture #(.CAPTURE_BITS(NB)) dut (.clk(clk), .rst(rst), .start(start), .bit_in(bit_in),
    .bit_valid(bit_valid), .tx_data(tx_data), .tx_valid(tx_valid), .tx_ready(tx_ready),
    .capturing(capturing), .sending(sending), .done(done));

  bit rec [NB];

  initial begin
    int nbits, nbytes, dones;
    logic [7:0] expb, prev;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int blk = 0; blk < 2; blk++) begin
      // bits before start are ignored
      repeat (5) begin
        @(negedge clk) bit_in = 1'($urandom); bit_valid = 1;
      end
      @(negedge clk) begin start = 1; bit_valid = 0; end
      @(negedge clk) start = 0;
      check(capturing == 1 && sending == 0, "capturing after start");
      nbits = 0;
      while (nbits < NB) begin
        bit_valid = ($urandom_range(0, 3) != 0);
        bit_in    = 1'($urandom);
        if (bit_valid) begin rec[nbits] = bit_in; nbits++; end
        @(negedge clk);
      end
      bit_valid = 0;
      nbytes = 0; dones = 0;
      while (nbytes < NB / 8) begin
        tx_ready = ($urandom_range(0, 2) == 0);
        bit_in = 1'($urandom); bit_valid = 1'($urandom);   // must be ignored now
        @(posedge clk);
        if (done) dones++;
        if (tx_valid && tx_ready) begin
          for (int i = 0; i < 8; i++) expb[i] = rec[nbytes * 8 + i];
          check(tx_data == expb, $sformatf("block %0d byte %0d got %h exp %h", blk, nbytes, tx_data, expb));
          nbytes++;
        end else if (tx_valid) begin
          prev = tx_data;
          #1 check(tx_valid == 1 && tx_data == prev, "offer held while not taken");
        end
        @(negedge clk);
        check(capturing == 0, "no capture while sending");
      end
      tx_ready = 0; bit_valid = 0;
      repeat (3) begin
        @(posedge clk); if (done) dones++;
      end
      check(dones == 1, $sformatf("one done pulse, saw %0d", dones));
      #1 check(!capturing && !sending && !tx_valid, "idle after the record");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
