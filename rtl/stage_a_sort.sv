// stage_a_sort - one Stage A algorithm FPGA of an e/gamma sort processor.
//
// Takes 24 of the 72 trigger objects of one class, presorts them in six
// groups of four (presort4) and finds the four highest-rank objects of the
// 24 with one second-stage block (sort_top4, N = 24). This split follows
// the document; the latencies (2 + 6 cycles by default) are this design's
// division of the document's 14-cycle total.
//
// Interface: in_obj[24] every cycle; out_obj[0..3], highest first,
// PRE_LAT + SORT_LAT cycles later.
module stage_a_sort
  import gct_pkg::*;
#(
  parameter int PRE_LAT  = 2,
  parameter int SORT_LAT = 6
) (
  input  logic clk,
  input  logic rst,
  input  obj_t in_obj  [24],
  output obj_t out_obj [4]
);
  obj_t pre [24];

  for (genvar g = 0; g < 6; g++) begin : g_pre
    presort4 #(.LAT(PRE_LAT)) u_pre (
      .clk(clk), .rst(rst),
      .in_obj (in_obj[4*g +: 4]),
      .out_obj(pre[4*g +: 4])
    );
  end

  sort_top4 #(.N(24), .LAT(SORT_LAT)) u_sort (
    .clk(clk), .rst(rst), .in_obj(pre), .out_obj(out_obj)
  );
endmodule
