// daq_concentrator_tb - checks the DAQ record packing with three sources of
// 70-bit fragments (three payload words each). Sources deliver fragments
// at random moments and the reader stalls at random; every record must
// carry header, event number, the fragments of all sources in order and
// the trailer, and each source must be popped exactly once per record.
module daq_concentrator_tb;
  localparam int NSRC = 3, W = 70, NW = 3, NREC = 2 + NSRC * NW, NEV = 60;

  logic clk = 0, rst = 1;
  logic [W-1:0] src_data [NSRC];
  logic src_valid [NSRC];
  logic src_pop, out_ctrl, out_valid, out_ready = 0;
  logic [31:0] out_data;
  logic [W-1:0] q [NSRC][$];     // fragments waiting per source
  logic [W-1:0] sent [NSRC][$];  // fragments in order, for checking
  int checks = 0, failures = 0, stalls = 0, recs = 0;

  daq_concentrator #(.NSRC(NSRC), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb
    for (int s = 0; s < NSRC; s++) begin
      src_valid[s] = (q[s].size() != 0);
      src_data[s]  = (q[s].size() != 0) ? q[s][0] : '0;
    end

  function automatic void chk(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("%s: got %h want %h", what, got, want);
    end
  endfunction

  // source side: fragments arrive at random, popped on src_pop
  initial begin
    int made [NSRC];
    foreach (made[s]) made[s] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    forever begin
      @(negedge clk);
      for (int s = 0; s < NSRC; s++)
        if (made[s] < NEV && $urandom_range(4) == 0) begin
          logic [W-1:0] f;
          f = {$urandom, $urandom, $urandom};
          q[s].push_back(f);
          sent[s].push_back(f);
          made[s]++;
        end
    end
  end
  always @(posedge clk) if (src_pop) for (int s = 0; s < NSRC; s++) void'(q[s].pop_front());

  // reader side
  initial begin
    int w;
    logic [NW*32-1:0] frag;
    w = 0;
    @(negedge clk);
    @(negedge clk);
    while (recs < NEV) begin
      out_ready = ($urandom_range(2) != 0);
      #1;
      if (out_valid && !out_ready) stalls++;
      if (out_valid && out_ready) begin
        if (w == 0) chk("header", out_data, {8'hA0, 24'(recs)});
        else if (w == NREC - 1) chk("trailer", out_data, {8'hF0, 8'(NSRC), 16'(NREC)});
        else begin
          int s, k;
          s = (w - 1) / NW; k = (w - 1) % NW;
          frag = {32'b0, sent[s][recs]};
          chk("payload", out_data, frag[32*k +: 32]);
        end
        chk("ctrl", out_ctrl, (w == 0 || w == NREC - 1));
        w++;
        if (w == NREC) begin w = 0; recs++; end
      end
      @(negedge clk);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (out_valid || stalls == 0) failures++;
    $display("records %0d, reader stalls %0d", recs, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
