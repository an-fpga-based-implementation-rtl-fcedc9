// im_sync - Input Module synchronisation of one ECL input cable.
//
// Data arrive from the Regional Calorimeter Trigger at 80 Mbit/s per bit
// with unknown phase, and possibly skewed by whole cycles from bit to bit.
// Each bit is oversampled OVS = 4 times per 80 MHz cycle by fast input
// registers (the document's out-of-phase fast FIFOs); samp[b][0..3] are the
// four samples of bit b taken during the current system cycle, earliest
// first. For every bit the block then
//   1. picks the one sample (phase) that lies furthest from the data
//      transitions, and
//   2. delays the picked bit by 0 .. DMAX-1 system cycles in a programmable
//      length shift register (the document's 80 MHz FIFO), so that all bits
//      of the cable line up with the correct bunch crossing.
// Phase and delay of each bit can be written through cfg_* or set
// automatically from a test pattern, as the document requires:
//   - while train_phase is high, the block records, per bit, between which
//     samples transitions occur (a toggling pattern makes them occur);
//     when train_phase falls, it chooses for each bit the sample whose
//     neighbouring sample gaps saw no transition, preferring the one
//     with the most transition-free gaps around it;
//   - a pulse on train_delay then starts alignment: counting from that
//     cycle, the first 1 seen on each phase-selected bit (the test
//     pattern's marker) arrives after arr cycles; the bit's delay becomes
//     DMAX-1-arr so that every bit presents the marker on dout DMAX+1
//     cycles after the pulse. A bit whose marker does not come within DMAX cycles sets
//     align_err. align_done rises DMAX cycles after the pulse.
// The fast-clock sampling registers and clock-domain crossing are outside
// this block; phase rule, marker scheme and DMAX are this design's choices.
//
// Timing: dout = bit sample delayed by (1 + delay) system cycles.
module im_sync #(
  parameter int W    = 28,
  parameter int DMAX = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [3:0]              samp [W],
  output logic [W-1:0]            dout,
  // direct configuration
  input  logic                    cfg_we,
  input  logic [$clog2(W)-1:0]    cfg_bit,
  input  logic [1:0]              cfg_phase,
  input  logic [$clog2(DMAX)-1:0] cfg_delay,
  // automatic setup
  input  logic                    train_phase,
  input  logic                    train_delay,
  output logic                    align_done,
  output logic                    align_err,
  output logic [1:0]              phase [W],
  output logic [$clog2(DMAX)-1:0] delay [W]
);
  localparam int DW = $clog2(DMAX);

  logic [3:0]      edges [W];      // edge seen between sample e and e+1
  logic [W-1:0]    last_s3;
  logic            train_q;
  logic [W-1:0]    sel;
  logic [DMAX-1:0] sr [W];
  logic            aligning;
  logic [DW:0]     acount;
  logic [W-1:0]    found;

  // Best sample for a mask of transition positions.
  function automatic logic [1:0] pick_phase(input logic [3:0] e);
    logic [1:0] best;
    int best_score;
    best = 0;
    best_score = -1;
    for (int p = 0; p < 4; p++) begin
      int sc;
      sc = 0;
      if (!e[(p + 3) % 4] && !e[p])
        sc = 2 + (e[(p + 2) % 4] ? 0 : 1) + (e[(p + 1) % 4] ? 0 : 1);
      if (sc > best_score) begin
        best = 2'(p);
        best_score = sc;
      end
    end
    return best;
  endfunction

  always_comb
    for (int b = 0; b < W; b++) sel[b] = samp[b][phase[b]];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int b = 0; b < W; b++) begin
        edges[b] <= '0; phase[b] <= '0; delay[b] <= '0; sr[b] <= '0;
      end
      last_s3 <= '0; train_q <= 1'b0;
      aligning <= 1'b0; acount <= '0; found <= '0;
      align_done <= 1'b0; align_err <= 1'b0;
    end else begin
      train_q <= train_phase;
      for (int b = 0; b < W; b++) begin
        last_s3[b] <= samp[b][3];
        sr[b] <= {sr[b][DMAX-2:0], sel[b]};
        if (train_phase) begin
          edges[b][0] <= edges[b][0] | (samp[b][0] ^ samp[b][1]);
          edges[b][1] <= edges[b][1] | (samp[b][1] ^ samp[b][2]);
          edges[b][2] <= edges[b][2] | (samp[b][2] ^ samp[b][3]);
          edges[b][3] <= edges[b][3] | (last_s3[b] ^ samp[b][0]);
        end else if (train_q) begin
          phase[b] <= pick_phase(edges[b]);
          edges[b] <= '0;
        end
      end
      // delay alignment
      if (train_delay) begin
        aligning   <= 1'b1;
        acount     <= '0;
        found      <= '0;
        align_done <= 1'b0;
        align_err  <= 1'b0;
      end else if (aligning) begin
        for (int b = 0; b < W; b++)
          if (!found[b] && sel[b]) begin
            found[b] <= 1'b1;
            delay[b] <= DW'(DMAX - 1) - DW'(acount);
          end
        if (acount == (DW+1)'(DMAX - 1)) begin
          aligning   <= 1'b0;
          align_done <= 1'b1;
          for (int b = 0; b < W; b++)
            if (!found[b] && !sel[b]) align_err <= 1'b1;
        end
        acount <= acount + 1'b1;
      end
      if (cfg_we) begin
        phase[cfg_bit] <= cfg_phase;
        delay[cfg_bit] <= cfg_delay;
      end
    end
  end

  always_comb
    for (int b = 0; b < W; b++) dout[b] = sr[b][delay[b]];
endmodule
