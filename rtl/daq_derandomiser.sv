// daq_derandomiser - Level-1 pipeline buffer and derandomiser for trigger
// data capture.
//
// Each FPGA keeps the trigger data it handles for the Level-1 latency and,
// for crossings that receive a Level-1 Accept, passes them on to the DAQ.
// A circular buffer of L1A_LAT words is written every cycle; when l1a is
// asserted, the word written L1A_LAT cycles earlier (the crossing the
// accept refers to) is pushed into a FIFO of FIFO_DEPTH words, which the
// readout side empties at its own pace with a valid/ready handshake
// (the derandomiser: accepts arrive at random, readout is steady).
// If an accept arrives with the FIFO full the word is dropped and
// overflow counts it. The document names the derandomiser FIFO and the
// DAQ bus; the buffer length (128 crossings of two 80 MHz cycles), FIFO
// depth and handshake are this design's choices.
//
// Timing: out_data/out_valid may change on the cycle after a push; a word
// leaves on each cycle where out_valid and out_ready are both high.
module daq_derandomiser #(
  parameter int W          = 64,
  parameter int L1A_LAT    = 256,
  parameter int FIFO_DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] din,
  input  logic         l1a,
  output logic [W-1:0] out_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [15:0]  overflow
);
  localparam int LW = $clog2(L1A_LAT);
  localparam int FW = $clog2(FIFO_DEPTH);

  logic [W-1:0]  pipe [L1A_LAT];
  logic [LW-1:0] wp;
  logic [W-1:0]  fifo [FIFO_DEPTH];
  logic [FW-1:0] fr, fw;
  logic [FW:0]   fcount;
  logic          push, pop;

  assign push = l1a && (fcount != (FW+1)'(FIFO_DEPTH));
  assign pop  = out_valid && out_ready;
  assign out_valid = (fcount != '0);
  assign out_data  = fifo[fr];

  always_ff @(posedge clk) begin
    pipe[wp] <= din;
    if (push) fifo[fw] <= pipe[wp];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; fr <= '0; fw <= '0; fcount <= '0; overflow <= '0;
    end else begin
      wp <= (wp == LW'(L1A_LAT - 1)) ? '0 : wp + 1'b1;
      if (push) fw <= (fw == FW'(FIFO_DEPTH - 1)) ? '0 : fw + 1'b1;
      if (pop)  fr <= (fr == FW'(FIFO_DEPTH - 1)) ? '0 : fr + 1'b1;
      fcount <= fcount + (FW+1)'(push) - (FW+1)'(pop);
      if (l1a && !push) overflow <= overflow + 1'b1;
    end
  end

  // The FIFO never reports more words than it can hold.
  a_fcount: assert property (@(posedge clk) disable iff (rst) fcount <= (FW+1)'(FIFO_DEPTH));
endmodule
