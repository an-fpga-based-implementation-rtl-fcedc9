// sort_top4 - selects the four highest-rank trigger objects out of N.
//
// This is the second-stage (24 -> 4) and third-stage (12 -> 4) block of the
// GCT object sort, and also serves the jet/tau sorts (36 -> 4) and the
// initial sort in each jet cluster module. It is fully pipelined and accepts
// a new set of N objects every clock.
//
// How it works: all N*(N-1)/2 rank comparisons are made in parallel; each
// object's position is the number of objects that beat it (higher rank, or
// equal rank and lower input index, so the positions form a permutation).
// Output slot k then takes the object whose position is k.
//   cycle 1: inputs registered
//   cycle 2: positions computed and registered
//   cycle 3: outputs selected and registered
//   cycles 4..LAT: plain register stages
// The document gives 14 cycles for the whole 72 -> 4 sort; this design
// splits it as 2 (presort) + 6 (second stage) + 6 (third stage), keeping
// the register stages beyond the third as the chip-to-chip transfer time.
// The comparison-count method is this design's choice.
//
// Interface: in_obj[N] sampled every cycle; out_obj[0..3] (highest rank
// first) appear LAT cycles later. Empty slots carry rank 0.
module sort_top4
  import gct_pkg::*;
#(
  parameter int N   = 24,
  parameter int LAT = 6
) (
  input  logic clk,
  input  logic rst,
  input  obj_t in_obj  [N],
  output obj_t out_obj [4]
);
  localparam int PW = $clog2(N + 1);

  initial assert (LAT >= 3) else $error("sort_top4: LAT must be at least 3");

  obj_t          r_in  [N];
  obj_t          r_obj [N];
  logic [PW-1:0] r_pos [N];
  obj_t          sel   [4];
  obj_t          r_sel [4];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) r_in[i] <= '0;
    end else begin
      r_in <= in_obj;
    end
  end

  // Positions: count of objects that beat object i.
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) begin
        r_obj[i] <= '0;
        r_pos[i] <= '0;
      end
    end else begin
      for (int i = 0; i < N; i++) begin
        logic [PW-1:0] cnt;
        cnt = '0;
        for (int j = 0; j < N; j++)
          if (j != i && beats(r_in[j].rank, j, r_in[i].rank, i)) cnt = cnt + 1'b1;
        r_pos[i] <= cnt;
        r_obj[i] <= r_in[i];
      end
    end
  end

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      sel[k] = '0;
      for (int i = 0; i < N; i++)
        if (r_pos[i] == PW'(k)) sel[k] = sel[k] | r_obj[i];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 4; k++) r_sel[k] <= '0;
    end else begin
      r_sel <= sel;
    end
  end

  for (genvar k = 0; k < 4; k++) begin : g_out
    pipe_delay #(.W(OBJ_W), .N(LAT - 3)) u_dly (
      .clk(clk), .rst(rst), .d(r_sel[k]), .q(out_obj[k])
    );
  end
endmodule
