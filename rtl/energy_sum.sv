// energy_sum - global energy summation.
//
// Adds the strip energies (scalar Et and the Q10 components Ex, Ey) from
// the NSRC jet cluster modules and derives, for every crossing:
//   et_tot  - total transverse energy;
//   met     - magnitude of the missing transverse energy vector,
//             floor(sqrt(mx^2 + my^2)) with (mx, my) = -(Ex, Ey) >> 10;
//   met_phi - its direction as one of 36 sectors of 10 degrees, sector k
//             covering [10k, 10k+10) degrees. Sector k is the one whose
//             lower boundary lies at or clockwise of the vector and whose
//             upper boundary lies anticlockwise of it, decided from the
//             signs of the cross products of the vector with the Q10
//             boundary directions. A zero vector gives sector 0.
// The document does the last step with a large external lookup table
// whose contents it does not give; here the same function is computed in
// logic (a shift-subtract integer square root and 36 sign tests).
// Sector count and output widths are this design's choices.
//
// Timing: fully pipelined, one crossing per clock, outputs LAT = 5 cycles
// after the inputs: register, sum, scale, square/cross, root/sector.
module energy_sum
  import gct_pkg::*;
#(
  parameter int NSRC = 9
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [15:0]        et_in [NSRC],
  input  logic signed [31:0] ex_in [NSRC],
  input  logic signed [31:0] ey_in [NSRC],
  output logic [19:0]        et_tot,
  output logic [20:0]        met,
  output logic [5:0]         met_phi
);
  localparam int NSEC = 36;

  logic [15:0]        r_et [NSRC];
  logic signed [31:0] r_ex [NSRC], r_ey [NSRC];
  logic [19:0]        s_et, d_et1, d_et2;
  logic signed [35:0] s_ex, s_ey;
  logic signed [25:0] mx, my;
  logic [51:0]        sq;
  logic [NSEC-1:0]    ge;          // vector at or anticlockwise of boundary k

  // Stage 1: input registers
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NSRC; i++) begin
        r_et[i] <= '0; r_ex[i] <= '0; r_ey[i] <= '0;
      end
    end else begin
      r_et <= et_in; r_ex <= ex_in; r_ey <= ey_in;
    end
  end

  // Stage 2: sums
  always_ff @(posedge clk) begin
    if (rst) begin
      s_et <= '0; s_ex <= '0; s_ey <= '0;
    end else begin
      logic [19:0]        a_et;
      logic signed [35:0] a_ex, a_ey;
      a_et = '0; a_ex = '0; a_ey = '0;
      for (int i = 0; i < NSRC; i++) begin
        a_et = a_et + 20'(r_et[i]);
        a_ex = a_ex + 36'(r_ex[i]);
        a_ey = a_ey + 36'(r_ey[i]);
      end
      s_et <= a_et; s_ex <= a_ex; s_ey <= a_ey;
    end
  end

  // Stage 3: missing vector, back to integer energy units
  always_ff @(posedge clk) begin
    if (rst) begin
      mx <= '0; my <= '0; d_et1 <= '0;
    end else begin
      mx <= 26'(-(s_ex >>> TRIG_Q));
      my <= 26'(-(s_ey >>> TRIG_Q));
      d_et1 <= s_et;
    end
  end

  // Stage 4: squared magnitude and boundary sign tests
  always_ff @(posedge clk) begin
    if (rst) begin
      sq <= '0; ge <= '0; d_et2 <= '0;
    end else begin
      logic signed [51:0] cr;
      sq <= 52'(mx * mx) + 52'(my * my);
      for (int k = 0; k < NSEC; k++) begin
        cr = 52'(my) * 52'(cosd10(k)) - 52'(mx) * 52'(sind10(k));
        ge[k] <= (cr >= 0);
      end
      d_et2 <= d_et1;
    end
  end

  // Integer square root, one result bit per step (shift-subtract method:
  // bring down two radicand bits, try subtracting 4*root+1).
  function automatic logic [25:0] isqrt(input logic [51:0] v);
    logic [25:0] root;
    logic [28:0] rem, trial;
    root = '0;
    rem  = '0;
    for (int i = 25; i >= 0; i--) begin
      rem   = {rem[26:0], v[2*i+1], v[2*i]};
      trial = {1'b0, root, 2'b01};
      if (rem >= trial) begin
        rem  = rem - trial;
        root = {root[24:0], 1'b1};
      end else begin
        root = {root[24:0], 1'b0};
      end
    end
    return root;
  endfunction

  // Stage 5: root and sector
  always_ff @(posedge clk) begin
    if (rst) begin
      met <= '0; met_phi <= '0; et_tot <= '0;
    end else begin
      logic [5:0] sec;
      sec = '0;
      for (int k = NSEC - 1; k >= 0; k--)
        if (ge[k] && !ge[(k + 1) % NSEC]) sec = 6'(k);
      met     <= 21'(isqrt(sq));
      met_phi <= sec;
      et_tot  <= d_et2;
    end
  end
endmodule
