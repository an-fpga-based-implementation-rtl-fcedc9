// capture_buffer - test-data capture and playback buffer.
//
// Every GCT FPGA carries deep memory buffers through which test data can be
// inserted into, or captured from, the processing chain. This buffer sits
// in line with a W-bit data stream and has three modes:
//   CB_PASS     - the stream passes through (one register stage);
//   CB_CAPTURE  - after a start pulse the next DEPTH stream words are
//                 written to the memory while the stream still passes;
//   CB_PLAYBACK - after a start pulse the memory contents replace the
//                 stream, address 0 first, wrapping round after DEPTH words.
// A separate control port (ctl_*) reads and writes the memory, so test
// patterns can be loaded and captures read back by the control processor.
// The modes, depth and port are this design's choices; the document says
// only that buffers for capture and playback exist in each FPGA.
//
// Timing: dout follows din (or the memory) by one cycle in every mode;
// ctl_rdata is valid one cycle after ctl_addr. busy is high while a capture
// or playback run is in progress (a playback run lasts until the mode
// changes).
module capture_buffer #(
  parameter int W     = 64,
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [1:0]               mode,   // 0 pass, 1 capture, 2 playback
  input  logic                     start,
  input  logic [W-1:0]             din,
  output logic [W-1:0]             dout,
  output logic                     busy,
  input  logic [$clog2(DEPTH)-1:0] ctl_addr,
  input  logic                     ctl_we,
  input  logic [W-1:0]             ctl_wdata,
  output logic [W-1:0]             ctl_rdata
);
  localparam int AW = $clog2(DEPTH);
  typedef enum logic [1:0] {CB_PASS = 2'd0, CB_CAPTURE = 2'd1, CB_PLAYBACK = 2'd2} cb_mode_e;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] addr;
  cb_mode_e      m;

  assign m = cb_mode_e'(mode);

  always_ff @(posedge clk) begin
    if (rst) begin
      addr <= '0;
      busy <= 1'b0;
    end else if (start) begin
      addr <= '0;
      busy <= (m != CB_PASS);
    end else if (busy) begin
      if (m == CB_PASS) busy <= 1'b0;
      else if (addr == AW'(DEPTH - 1)) begin
        addr <= '0;
        if (m == CB_CAPTURE) busy <= 1'b0;
      end else addr <= addr + 1'b1;
    end
  end

  // Memory: capture writes have priority over control writes.
  always_ff @(posedge clk) begin
    if (busy && m == CB_CAPTURE) mem[addr] <= din;
    else if (ctl_we)             mem[ctl_addr] <= ctl_wdata;
    ctl_rdata <= mem[ctl_addr];
  end

  always_ff @(posedge clk) begin
    if (rst) dout <= '0;
    else if (busy && m == CB_PLAYBACK) dout <= mem[addr];
    else dout <= din;
  end
endmodule
