// im_output_map - programmable mapping of Input Module data onto the
// serial output links.
//
// The synchronised input bits of all cables (NIN bits) are routed onto
// NLINK output links of LINK_W bits each (28 bits per Channel Link
// transfer, as in the document). Every output bit has its own source
// register holding the index of the input bit it carries; the value NIN
// selects a constant 0. Because any number of outputs may select the same
// input, data can be duplicated onto several links, which the jet cluster
// modules need (neighbouring strips share border regions). The document
// says only that the mapping is flexible and that the output bandwidth
// exceeds the input bandwidth; the per-bit crossbar and the link count are
// this design's choices.
//
// Interface: map_we / map_idx / map_src write one output bit's source
// (after reset every output selects constant 0). Timing: link data is
// registered, one cycle after din.
module im_output_map #(
  parameter int NIN    = 224,
  parameter int NLINK  = 12,
  parameter int LINK_W = 28
) (
  input  logic                              clk,
  input  logic                              rst,
  input  logic [NIN-1:0]                    din,
  output logic [LINK_W-1:0]                 link [NLINK],
  input  logic                              map_we,
  input  logic [$clog2(NLINK*LINK_W)-1:0]   map_idx,
  input  logic [$clog2(NIN+1)-1:0]          map_src
);
  localparam int NOUT = NLINK * LINK_W;
  localparam int SW   = $clog2(NIN + 1);

  logic [SW-1:0] src [NOUT];
  logic [NIN:0]  din_z;

  assign din_z = {1'b0, din};

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int o = 0; o < NOUT; o++) src[o] <= SW'(NIN);
    end else if (map_we && int'(map_idx) < NOUT) begin
      src[map_idx] <= (int'(map_src) > NIN) ? SW'(NIN) : map_src;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int l = 0; l < NLINK; l++) link[l] <= '0;
    end else begin
      for (int l = 0; l < NLINK; l++)
        for (int k = 0; k < LINK_W; k++)
          link[l][k] <= din_z[src[l * LINK_W + k]];
    end
  end
endmodule
