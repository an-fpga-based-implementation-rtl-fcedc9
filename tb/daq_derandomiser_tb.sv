// daq_derandomiser_tb - checks the Level-1 buffer and derandomiser
// (L1A_LAT = 40, FIFO_DEPTH = 4). The data stream is the cycle number, so
// each accepted word must equal the accept's cycle minus L1A_LAT. Accepts
// come at random, in bursts that overflow the FIFO (counted against the
// overflow counter), and the reader stalls at random.
module daq_derandomiser_tb;
  localparam int W = 16, LAT = 40, FD = 4, NCYC = 3000;

  logic clk = 0, rst = 1;
  logic [W-1:0] din = '0, out_data;
  logic l1a = 0, out_valid, out_ready = 0;
  logic [15:0] overflow;
  int expq [$];
  int checks = 0, failures = 0, drops = 0, nread = 0, stalls = 0;

  daq_derandomiser #(.W(W), .L1A_LAT(LAT), .FIFO_DEPTH(FD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit full;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int cyc = 0; cyc < NCYC; cyc++) begin
      // outputs of the previous edge
      din = W'(cyc);
      if (cyc > LAT) begin
        l1a = ((cyc / 500) % 2 == 1) ? ($urandom_range(3) == 0) : ($urandom_range(19) == 0);
      end else l1a = 0;
      out_ready = ((cyc / 500) % 2 == 1) ? ($urandom_range(7) == 0) : ($urandom_range(3) != 0);
      if (out_valid && !out_ready) stalls++;
      #1;
      full = (expq.size() == FD);
      // bookkeeping for this edge
      if (out_valid && out_ready) begin
        int w;
        w = expq.pop_front();
        checks++;
        nread++;
        if (out_data != W'(w)) begin
          failures++;
          if (failures < 10) $display("cycle %0d: got %0d want %0d", cyc, out_data, w);
        end
      end
      if (l1a) begin
        if (!full) begin
          expq.push_back(cyc - LAT);
        end else drops++;
      end
      @(negedge clk);
    end
    checks++;
    if (overflow != 16'(drops) || drops == 0) begin
      failures++;
      $display("overflow %0d, expected %0d", overflow, drops);
    end
    $display("read %0d, dropped %0d, reader stalls %0d", nread, drops, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
