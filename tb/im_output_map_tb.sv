// im_output_map_tb - checks the Input Module output mapping at its default
// size: a random map in which many outputs duplicate the same input and
// some are left at constant 0 (including out-of-range source values), then
// random input data compared bit by bit, one cycle later, with the map.
module im_output_map_tb;
  localparam int NIN = 224, NLINK = 12, LW = 28, NOUT = NLINK * LW, NEV = 200;

  logic clk = 0, rst = 1;
  logic [NIN-1:0] din = '0;
  logic [LW-1:0] link [NLINK];
  logic map_we = 0;
  logic [8:0] map_idx = '0;
  logic [7:0] map_src = '0;
  int src [NOUT];
  int checks = 0, failures = 0, dups = 0;

  im_output_map dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NIN-1:0] prev;
    int used [NIN];
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    foreach (used[i]) used[i] = 0;
    for (int o = 0; o < NOUT; o++) begin
      int s;
      s = (o % 23 == 0) ? 250 : (o % 19 == 0) ? NIN : $urandom_range(NIN - 1);
      if (o % 29 == 5) s = 3;                 // heavy duplication of one input
      src[o] = s;
      if (s < NIN) begin used[s]++; if (used[s] == 2) dups++; end
      map_we = 1; map_idx = 9'(o); map_src = 8'(s);
      @(negedge clk);
    end
    map_we = 0;
    for (int i = 0; i < NEV; i++) begin
      din = {7{$urandom}};
      prev = din;
      @(negedge clk);
      for (int o = 0; o < NOUT; o++) begin
        logic want;
        want = (src[o] < NIN) ? prev[src[o]] : 1'b0;
        checks++;
        if (link[o / LW][o % LW] != want) begin
          failures++;
          if (failures < 10) $display("out %0d: got %b want %b", o, link[o / LW][o % LW], want);
        end
      end
    end
    $display("inputs duplicated: %0d", dups);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
