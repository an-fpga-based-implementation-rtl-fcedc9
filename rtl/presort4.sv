// presort4 - first stage of the GCT object sort.
//
// Orders a group of four trigger objects by rank, highest first, without
// discarding any (the document's "presort": no data is lost, but later
// stages see ordered groups). Ties keep input order. Fully pipelined.
//   cycle 1: inputs registered
//   cycle 2: the six comparisons, the resulting positions and the output
//            selection, registered
// LAT = 2 is this design's share of the document's 14-cycle sort latency;
// extra cycles are added as plain register stages.
//
// Interface: in_obj[4] every cycle, out_obj[4] sorted, LAT cycles later.
module presort4
  import gct_pkg::*;
#(
  parameter int LAT = 2
) (
  input  logic clk,
  input  logic rst,
  input  obj_t in_obj  [4],
  output obj_t out_obj [4]
);
  initial assert (LAT >= 2) else $error("presort4: LAT must be at least 2");

  obj_t r_in [4];
  obj_t srt  [4];
  obj_t r_out [4];

  always_ff @(posedge clk) begin
    if (rst) for (int i = 0; i < 4; i++) r_in[i] <= '0;
    else     r_in <= in_obj;
  end

  always_comb begin
    for (int k = 0; k < 4; k++) srt[k] = '0;
    for (int i = 0; i < 4; i++) begin
      int p;
      p = 0;
      for (int j = 0; j < 4; j++)
        if (j != i && beats(r_in[j].rank, j, r_in[i].rank, i)) p++;
      srt[p] = r_in[i];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) for (int i = 0; i < 4; i++) r_out[i] <= '0;
    else     r_out <= srt;
  end

  for (genvar k = 0; k < 4; k++) begin : g_out
    pipe_delay #(.W(OBJ_W), .N(LAT - 2)) u_dly (
      .clk(clk), .rst(rst), .d(r_out[k]), .q(out_obj[k])
    );
  end
endmodule
