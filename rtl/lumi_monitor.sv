// lumi_monitor - bunch-by-bunch luminosity counters.
//
// For every bunch crossing the monitor adds NCH per-crossing object counts
// (in the GCT: multiplicities of selected jets, such as high-Et central
// jets, taken from the jet counts) into accumulators indexed by the
// crossing number, so that each of the NBX bunch positions of the LHC
// orbit integrates its own rate. The document describes the luminosity
// logic as "largely counters" integrating the rate of selected objects,
// delivered at regular intervals; the double-buffered memory below is this
// design's way of doing that.
//
// Two banks of NBX x NCH accumulators: one integrates while the other holds
// the result of the previous period for readout. A period is INTEG_ORBITS
// orbits; an orbit ends when a crossing with bx = NBX-1 is accumulated.
// At a period boundary the banks swap and the first orbit of the new
// period writes instead of adding, so no clearing pass is needed.
// Accumulators saturate at 2**ACC_W - 1.
//
// Interface: in_valid / bx / cnt once per crossing (bx counts 0..NBX-1);
// rd_bx / rd_ch select an accumulator of the finished bank, rd_data is
// valid the next cycle; period is incremented at each swap.
// Timing: read-modify-write over two cycles; each bx is updated once per
// orbit, so there are no hazards as long as the same bx is not presented
// on consecutive cycles.
module lumi_monitor #(
  parameter int NBX          = 3564,
  parameter int NCH          = 2,
  parameter int CNT_W        = 5,
  parameter int ACC_W        = 24,
  parameter int INTEG_ORBITS = 16
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      in_valid,
  input  logic [$clog2(NBX)-1:0]    bx,
  input  logic [CNT_W-1:0]          cnt     [NCH],
  input  logic [$clog2(NBX)-1:0]    rd_bx,
  input  logic [(NCH > 1 ? $clog2(NCH) : 1)-1:0] rd_ch,
  output logic [ACC_W-1:0]          rd_data,
  output logic [15:0]               period
);
  localparam int BW = $clog2(NBX);
  localparam int OW = $clog2(INTEG_ORBITS + 1);

  logic [ACC_W-1:0] mem0 [NBX][NCH];
  logic [ACC_W-1:0] mem1 [NBX][NCH];

  logic             bank;        // bank being integrated
  logic [OW-1:0]    orbit;       // orbit within the period
  // pipeline stage 2 of the read-modify-write
  logic             p_valid, p_first, p_bank;
  logic [BW-1:0]    p_bx;
  logic [CNT_W-1:0] p_cnt [NCH];
  logic [ACC_W-1:0] p_old [NCH];

  // Stage 1: read the accumulators of this crossing.
  always_ff @(posedge clk) begin
    if (rst) begin
      p_valid <= 1'b0; p_first <= 1'b0; p_bank <= 1'b0; p_bx <= '0;
      for (int c = 0; c < NCH; c++) begin p_cnt[c] <= '0; p_old[c] <= '0; end
    end else begin
      p_valid <= in_valid;
      p_first <= (orbit == '0);
      p_bank  <= bank;
      p_bx    <= bx;
      p_cnt   <= cnt;
      for (int c = 0; c < NCH; c++) p_old[c] <= bank ? mem1[bx][c] : mem0[bx][c];
    end
  end

  // Stage 2: add and write back.
  always_ff @(posedge clk) begin
    if (p_valid) begin
      for (int c = 0; c < NCH; c++) begin
        logic [ACC_W:0] s;
        s = (p_first ? '0 : {1'b0, p_old[c]}) + (ACC_W+1)'(p_cnt[c]);
        if (s[ACC_W]) s = {1'b0, {ACC_W{1'b1}}};
        if (p_bank) mem1[p_bx][c] <= s[ACC_W-1:0];
        else        mem0[p_bx][c] <= s[ACC_W-1:0];
      end
    end
  end

  // Orbit and period bookkeeping.
  always_ff @(posedge clk) begin
    if (rst) begin
      bank <= 1'b0; orbit <= '0; period <= '0;
    end else if (in_valid && bx == BW'(NBX - 1)) begin
      if (orbit == OW'(INTEG_ORBITS - 1)) begin
        orbit  <= '0;
        bank   <= ~bank;
        period <= period + 1'b1;
      end else begin
        orbit <= orbit + 1'b1;
      end
    end
  end

  // Readout of the finished bank.
  always_ff @(posedge clk) begin
    if (rst) rd_data <= '0;
    else     rd_data <= bank ? mem0[rd_bx][rd_ch] : mem1[rd_bx][rd_ch];
  end
endmodule
