`timescale 1ps/1fs
// ppv_counter: oscillation-frequency readout of a FUB (MUX, divide-by-N and
// counter).
//
// The multiplexer picks the output of ring oscillator sel. A divide-by-DIV_N
// (DIV_N even) brings its frequency down to one that slow test logic can
// handle, and a counter counts the divided periods while RESET is low; the
// count over a known time window gives the oscillator period, i.e. the
// process variation. Only the block names are documented: the divider ratio
// (8) and the 16-bit counter are this design's choices.
//
// Interface: ro[Q-1:0] oscillator outputs, sel, reset (async, active high);
// div_out = selected ro / DIV_N; count increments on each div_out rising edge.
module ppv_counter #(
  parameter int Q     = 2,
  parameter int DIV_N = 8,
  parameter int CW    = 16,
  localparam int SW   = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic [Q-1:0]  ro,
  input  logic [SW-1:0] sel,
  input  logic          reset,
  output logic          div_out,
  output logic [CW-1:0] count
);
  localparam int HW = $clog2(DIV_N / 2 + 1);

  logic          ro_sel;
  logic [HW-1:0] half_cnt;

  assign ro_sel = ro[sel];

  always_ff @(posedge ro_sel or posedge reset) begin
    if (reset) begin
      half_cnt <= '0;
      div_out  <= 1'b0;
    end else if (half_cnt == HW'(DIV_N / 2 - 1)) begin
      half_cnt <= '0;
      div_out  <= ~div_out;
    end else begin
      half_cnt <= half_cnt + 1'b1;
    end
  end

  always_ff @(posedge div_out or posedge reset) begin
    if (reset) count <= '0;
    else       count <= count + 1'b1;
  end
endmodule
