// sort_top4_tb - checks the generic top-4 selector at its default size (24 -> 4, six cycles).
// Every cycle a fresh set of 24 random objects enters (rank range varied
// so that ties and empty slots occur); the outputs are compared with a
// reference top-4 search exactly 6 cycles later.
module sort_top4_tb;
  import gct_pkg::*;
  import sort_ref_pkg::*;

  localparam int LAT = 6;
  localparam int NSETS = 400;

  logic clk = 0, rst = 1;
  obj_t in_obj [24];
  obj_t out_obj [4];
  obj_t expq [$];
  int checks = 0, failures = 0;

  sort_top4 dut (.clk(clk), .rst(rst), .in_obj(in_obj), .out_obj(out_obj));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    obj_q_t lst;
    obj_t e [4];
    foreach (in_obj[i]) in_obj[i] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int cyc = 0; cyc < NSETS + LAT; cyc++) begin
      @(negedge clk);
      // compare the set that entered LAT cycles ago
      if (cyc >= LAT) begin
        for (int k = 0; k < 4; k++) begin
          e[k] = expq[k];
          checks++;
          if (out_obj[k] !== e[k]) begin
            failures++;
            if (failures < 10) $display("cycle %0d slot %0d: got %h expected %h", cyc, k, out_obj[k], e[k]);
          end
        end
        for (int k = 0; k < 4; k++) void'(expq.pop_front());
      end
      lst = {};
      for (int i = 0; i < 24; i++) begin
        int mr;
        mr = (cyc % 3 == 0) ? 7 : 63;   // narrow rank range: many ties
        in_obj[i] = (cyc % 5 == 1 && i > 3) ? '0 : rand_obj(mr);
        lst.push_back(in_obj[i]);
      end
      top4(lst, e);
      for (int k = 0; k < 4; k++) expq.push_back(e[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
