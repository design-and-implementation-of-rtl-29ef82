// bit_capture: output record buffer between the modulator and the RS232
// link. The modulator produces one bit per 66 MHz clock, far faster than a
// serial line, so a block of CAPTURE_BITS consecutive output bits is first
// stored in on-chip memory and then read out byte by byte to the
// transmitter.
//
// Operation: a start pulse in IDLE begins a capture at the next valid input
// bit. Bits are packed eight to a byte, the earliest bit in bit 0, and each
// full byte is written to mem. After the last byte the buffer reads the bytes
// in order (one clock memory read) and offers each on tx_data/tx_valid until
// the transmitter takes it with tx_ready (valid/ready handshake). After the
// last byte the buffer returns to IDLE and pulses done.
//
// The published design only says that the output is taken over RS232; the
// buffer, its size and its byte format are this design's choice.
module bit_capture #(
  parameter int CAPTURE_BITS = 65536   // multiple of 8
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       bit_in,
  input  logic       bit_valid,
  output logic [7:0] tx_data,
  output logic       tx_valid,
  input  logic       tx_ready,
  output logic       capturing,
  output logic       sending,
  output logic       done
);

  localparam int NBYTES = CAPTURE_BITS / 8;
  localparam int AW     = (NBYTES > 1) ? $clog2(NBYTES) : 1;

  typedef enum logic [2:0] {IDLE, CAPTURE, READ, OFFER, FINISH} state_e;

  state_e        state;
  logic [7:0]    mem [NBYTES];
  logic [AW-1:0] addr;
  logic [2:0]    bit_cnt;
  logic [6:0]    shreg;
  logic [7:0]    rd_data;

  assign capturing = (state == CAPTURE);
  assign sending   = (state == READ) || (state == OFFER);
  assign tx_valid  = (state == OFFER);
  assign tx_data   = rd_data;

  // memory: one write port, one registered read port
  always_ff @(posedge clk) begin
    if (state == CAPTURE && bit_valid && bit_cnt == 3'd7)
      mem[addr] <= {bit_in, shreg};
    rd_data <= mem[addr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= IDLE;
      addr    <= '0;
      bit_cnt <= '0;
      shreg   <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE: if (start) begin
          state   <= CAPTURE;
          addr    <= '0;
          bit_cnt <= '0;
        end
        CAPTURE: if (bit_valid) begin
          shreg   <= {bit_in, shreg[6:1]};
          bit_cnt <= bit_cnt + 3'd1;
          if (bit_cnt == 3'd7) begin
            if (int'(addr) == NBYTES-1) begin
              addr  <= '0;
              state <= READ;
            end else begin
              addr <= addr + AW'(1);
            end
          end
        end
        READ: state <= OFFER;         // rd_data valid in the next clock
        OFFER: if (tx_ready) begin
          if (int'(addr) == NBYTES-1) begin
            state <= FINISH;
          end else begin
            addr  <= addr + AW'(1);
            state <= READ;
          end
        end
        default: begin                // FINISH
          done  <= 1'b1;
          state <= IDLE;
        end
      endcase
    end
  end

endmodule
