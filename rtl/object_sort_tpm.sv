// object_sort_tpm - Trigger Processor Module configured as an e/gamma sort.
//
// Finds the four highest-rank objects out of 72 of one class (e/gamma or
// isolated e/gamma), as the document describes: three Stage A FPGAs each
// presort 24 objects and reduce them to 4 (stage_a_sort); the Stage B FPGA
// reduces the resulting 12 to the final 4 (sort_top4, N = 12).
// With the default latencies (2 + 6 + 6) the result leaves 14 clock cycles
// (seven bunch crossings at 80 MHz) after the objects enter, the document's
// figure. Fully pipelined: a new set of 72 objects may enter every clock.
// Stage A FPGA a takes objects 24a .. 24a+23.
//
// Interface: in_obj[72]; out_obj[0..3], highest rank first, LAT later.
module object_sort_tpm
  import gct_pkg::*;
#(
  parameter int PRE_LAT = 2,
  parameter int A_LAT   = 6,
  parameter int B_LAT   = 6
) (
  input  logic clk,
  input  logic rst,
  input  obj_t in_obj  [72],
  output obj_t out_obj [4]
);
  obj_t a_out [12];

  for (genvar a = 0; a < 3; a++) begin : g_stage_a
    stage_a_sort #(.PRE_LAT(PRE_LAT), .SORT_LAT(A_LAT)) u_a (
      .clk(clk), .rst(rst),
      .in_obj (in_obj[24*a +: 24]),
      .out_obj(a_out[4*a +: 4])
    );
  end

  sort_top4 #(.N(12), .LAT(B_LAT)) u_stage_b (
    .clk(clk), .rst(rst), .in_obj(a_out), .out_obj(out_obj)
  );
endmodule
