// uart_tx: double-buffered asynchronous serial transmitter (TxD).
//
// A byte written with `wr` goes into the holding register; `thr_empty` says
// the holding register can take another byte.  On a `bit_tick` strobe (one
// per bit period, from the external 9600 Hz CLK_UART generator) with the
// shift register idle, the held byte moves to the shift register and the
// frame starts.  Frame, least significant data bit first:
//   start '0', D0..D7, parity bit, STOP_BITS stop bits '1'
// Between frames the line rests at '1' (the marker).  The parity bit makes
// the number of ones in data plus parity even (odd if ODD_PARITY).
// Each bit lasts exactly one bit_tick interval; a new frame may follow the
// last stop bit without a gap.  The frame layout, two stop bits and the
// double buffering are the document's; the parity sense is this design's.
module uart_tx #(
  parameter int unsigned STOP_BITS  = 2,
  parameter bit          ODD_PARITY = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bit_tick,
  input  logic       wr,
  input  logic [7:0] wdata,
  output logic       thr_empty,
  output logic       busy,
  output logic       txd
);
  localparam int unsigned FRAME = 1 + 8 + 1 + STOP_BITS;

  logic [7:0]       thr;
  logic             thr_full;
  logic [FRAME-2:0] sh;     // bits still to send after the current one
  logic [3:0]       left;   // bits still to send after the current one
  logic             parity;

  assign parity = (^thr) ^ ODD_PARITY;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      thr      <= '0;
      thr_full <= 1'b0;
      sh       <= '1;
      left     <= '0;
      busy     <= 1'b0;
      txd      <= 1'b1;
    end else begin
      if (wr && !thr_full) begin
        thr      <= wdata;
        thr_full <= 1'b1;
      end
      if (bit_tick) begin
        if (left != 4'd0) begin
          txd  <= sh[0];
          sh   <= {1'b1, sh[FRAME-2:1]};
          left <= left - 4'd1;
        end else if (thr_full) begin
          txd      <= 1'b0;                               // start bit
          sh       <= {{STOP_BITS{1'b1}}, parity, thr};
          left     <= 4'(FRAME - 1);
          busy     <= 1'b1;
          thr_full <= 1'b0;
        end else begin
          txd  <= 1'b1;
          busy <= 1'b0;
        end
      end
    end
  end

  assign thr_empty = !thr_full;

  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    wr |-> !thr_full);
endmodule
