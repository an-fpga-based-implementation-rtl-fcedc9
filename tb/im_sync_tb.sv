// im_sync_tb - checks automatic synchronisation of one input cable.
// Every bit gets its own random sampling phase (quarter-cycle steps) and
// its own skew of 0..5 whole cycles, and the sample closest to each
// transition returns random values, so a wrong phase choice shows. The source words are: a toggling
// pattern for phase training, a single all-ones marker word for delay
// alignment, then random data. After setup, every bit of dout must carry
// the same source word, a fixed DMAX+1 cycles after the alignment pulse
// relative to the marker. Also checked: an alignment with no marker sets
// align_err, and a configuration write sets phase and delay of one bit.
module im_sync_tb;
  localparam int W = 28, DMAX = 16, NDATA = 300;

  logic clk = 0, rst = 1;
  logic [3:0] samp [W];
  logic [W-1:0] dout;
  logic cfg_we = 0;
  logic [4:0] cfg_bit = '0;
  logic [1:0] cfg_phase = '0;
  logic [3:0] cfg_delay = '0;
  logic train_phase = 0, train_delay = 0, align_done, align_err;
  logic [1:0] phase [W];
  logic [3:0] delay [W];

  int ph [W], sk [W];
  logic [W-1:0] src [int];      // source word by transmit index
  int t = 0;                    // current cycle
  int checks = 0, failures = 0;

  im_sync #(.W(W), .DMAX(DMAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] word(input int n);
    return src.exists(n) ? src[n] : '0;
  endfunction

  // samples of cycle t: sample j of bit b sees word t - sk - (j < ph);
  // the sample right at the transition (j == ph) is unreliable: random
  task automatic drive();
    for (int b = 0; b < W; b++)
      for (int j = 0; j < 4; j++)
        samp[b][j] = (j == ph[b]) ? 1'($urandom) : word(t - sk[b] - ((j < ph[b]) ? 1 : 0))[b];
  endtask

  task automatic step();
    @(negedge clk);
    t++;
    drive();
  endtask

  initial begin
    int P, M, L, n_err;
    for (int b = 0; b < W; b++) begin ph[b] = $urandom_range(3); sk[b] = $urandom_range(5); end
    for (int n = -10; n < 60; n++) src[n] = (n % 2 != 0) ? '1 : '0;   // toggle pattern
    drive();
    repeat (2) step();
    rst = 0;
    train_phase = 1;
    repeat (40) step();
    train_phase = 0;
    repeat (2) step();
    for (int n = t - 10; n < 2000; n++) src[n] = '0;
    P = t + 8;
    M = P + 3;
    src[M] = '1;
    repeat (8) step();
    train_delay = 1;
    step();
    train_delay = 0;
    for (int n = M + 1; n < M + 30 + NDATA; n++) src[n] = W'({$urandom, $urandom});
    while (!align_done) step();
    checks++;
    if (align_err) begin failures++; $display("unexpected align_err"); end
    // dout at cycle c carries source word c - (P + DMAX + 1) + M
    L = P + DMAX + 1 - M;
    repeat (3) step();
    for (int i = 0; i < NDATA; i++) begin
      checks++;
      if (dout != word(t - L)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: dout %h want %h", t, dout, word(t - L));
      end
      step();
    end
    // alignment without a marker must fail
    for (int n = t - 10; n < t + 40; n++) src[n] = '0;
    train_delay = 1;
    step();
    train_delay = 0;
    n_err = 0;
    while (!align_done) step();
    checks++;
    if (!align_err) begin failures++; $display("missing align_err"); end
    // direct configuration
    cfg_we = 1; cfg_bit = 5'd7; cfg_phase = 2'd3; cfg_delay = 4'd9;
    step();
    cfg_we = 0;
    step();
    checks++;
    if (phase[7] != 2'd3 || delay[7] != 4'd9) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
