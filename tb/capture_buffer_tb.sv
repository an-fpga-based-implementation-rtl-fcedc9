// capture_buffer_tb - checks the capture/playback buffer (W = 16,
// DEPTH = 32): pass-through with one cycle of delay, a capture run read
// back through the control port, playback of a pattern loaded through the
// control port (including wrap-round), and the busy flag's run lengths.
module capture_buffer_tb;
  localparam int W = 16, DEPTH = 32;

  logic clk = 0, rst = 1;
  logic [1:0] mode = 0;
  logic start = 0, busy, ctl_we = 0;
  logic [W-1:0] din = '0, dout, ctl_wdata = '0, ctl_rdata;
  logic [4:0] ctl_addr = '0;
  logic [W-1:0] prev;
  logic [W-1:0] cap [DEPTH];
  int checks = 0, failures = 0;

  capture_buffer #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [W-1:0] got, input logic [W-1:0] want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("%s: got %h want %h", what, got, want);
    end
  endtask

  initial begin
    int busy_cycles;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    // pass-through
    for (int i = 0; i < 10; i++) begin
      din = W'($urandom); prev = din;
      @(negedge clk);
      chk("pass", dout, prev);
    end
    // capture run: the DEPTH words after start
    mode = 1; start = 1; din = W'($urandom);
    @(negedge clk);
    start = 0;
    busy_cycles = 0;
    for (int i = 0; i < DEPTH + 5; i++) begin
      if (busy) begin cap[busy_cycles] = din; busy_cycles++; end
      @(negedge clk);
      din = W'($urandom);
    end
    checks++;
    if (busy_cycles != DEPTH) begin failures++; $display("capture ran %0d cycles", busy_cycles); end
    mode = 0;
    for (int a = 0; a < DEPTH; a++) begin
      ctl_addr = 5'(a);
      @(negedge clk);
      chk("capture readback", ctl_rdata, cap[a]);
    end
    // load a pattern and play it back twice round
    for (int a = 0; a < DEPTH; a++) begin
      ctl_addr = 5'(a); ctl_we = 1; ctl_wdata = W'(16'hA000 + a * 3);
      @(negedge clk);
    end
    ctl_we = 0;
    mode = 2; start = 1;
    @(negedge clk);
    start = 0;
    @(negedge clk);
    for (int i = 0; i < 2 * DEPTH; i++) begin
      din = W'($urandom);
      chk("playback", dout, W'(16'hA000 + (i % DEPTH) * 3));
      @(negedge clk);
    end
    checks++;
    if (!busy) failures++;
    mode = 0;
    @(negedge clk);
    checks++;
    if (busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
