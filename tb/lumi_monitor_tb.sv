// lumi_monitor_tb - checks the bunch-by-bunch luminosity counters at a
// reduced orbit (NBX = 20 crossings, 3 orbits per period, 6-bit
// accumulators so that saturation occurs). Random counts are fed for
// every crossing; after each bank swap the whole finished bank is read
// back through the readout port and compared with sums kept here.
module lumi_monitor_tb;
  localparam int NBX = 20, NCH = 2, CNT_W = 5, ACC_W = 6, IO = 3, PERIODS = 6;

  logic clk = 0, rst = 1;
  logic in_valid = 0;
  logic [$clog2(NBX)-1:0] bx = '0, rd_bx = '0;
  logic [CNT_W-1:0] cnt [NCH];
  logic [0:0] rd_ch = '0;
  logic [ACC_W-1:0] rd_data;
  logic [15:0] period;
  int acc [PERIODS][NBX][NCH];
  int checks = 0, failures = 0, sat = 0;

  lumi_monitor #(.NBX(NBX), .NCH(NCH), .CNT_W(CNT_W), .ACC_W(ACC_W), .INTEG_ORBITS(IO)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // readout of the finished bank, concurrent with integration
  task automatic read_back(input int p);
    for (int b = 0; b < NBX; b++)
      for (int c = 0; c < NCH; c++) begin
        int w;
        rd_bx <= $clog2(NBX)'(b); rd_ch <= 1'(c);
        @(posedge clk); @(negedge clk);
        w = acc[p][b][c] > 63 ? 63 : acc[p][b][c];
        if (w == 63) sat++;
        checks++;
        if (rd_data != ACC_W'(w)) begin
          failures++;
          if (failures < 10) $display("period %0d bx %0d ch %0d: got %0d want %0d", p, b, c, rd_data, w);
        end
      end
  endtask

  initial begin
    foreach (acc[p, b, c]) acc[p][b][c] = 0;
    foreach (cnt[c]) cnt[c] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    fork
      begin
        for (int p = 0; p < PERIODS; p++)
          for (int o = 0; o < IO; o++)
            for (int b = 0; b < NBX; b++) begin
              @(negedge clk);
              in_valid = 1; bx = $clog2(NBX)'(b);
              foreach (cnt[c]) begin
                cnt[c] = CNT_W'((p == 2 && c == 1) ? 31 : $urandom_range(31));
                acc[p][b][c] += cnt[c];
              end
              @(negedge clk);       // a crossing every second cycle, as at 80 MHz
              in_valid = 0;
            end
      end
      begin
        for (int p = 0; p < PERIODS - 1; p++) begin
          wait (period == 16'(p + 1));
          repeat (3) @(negedge clk);
          read_back(p);
        end
      end
    join
    checks++;
    if (sat == 0) failures++;
    checks++;
    if (period != 16'(PERIODS)) failures++;
    $display("saturated accumulators seen: %0d", sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
