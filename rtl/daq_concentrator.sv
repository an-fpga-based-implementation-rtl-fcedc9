// daq_concentrator - packs the trigger data of accepted crossings into a
// single 32-bit readout stream.
//
// The concentrator receives, for every Level-1 Accept, one fragment from
// each of NSRC sources (derandomiser FIFOs of the processing modules and
// Input Modules, all fed by the same accepts and so in step). When every
// source has a fragment waiting it emits one event record:
//   header  : {8'hA0, 24-bit event number}                  (ctrl = 1)
//   payload : for each source in turn, its W-bit fragment in
//             ceil(W/32) words, least significant word first (ctrl = 0)
//   trailer : {8'hF0, 8-bit NSRC, 16-bit record length in words} (ctrl = 1)
// and then takes the fragments from the sources (src_pop). The original
// system packs DAQ data into a standard format for an SLINK interface
// without giving that format; the record layout above is this design's.
//
// Interface: src_data/src_valid per source (FIFO heads), src_pop pulses
// for one cycle when the record is finished. out_* is a valid/ready
// stream; a word moves on each cycle where out_valid and out_ready are
// high. Event numbers count records from reset, starting at 0.
module daq_concentrator #(
  parameter int NSRC = 2,
  parameter int W    = 427
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [W-1:0]  src_data  [NSRC],
  input  logic          src_valid [NSRC],
  output logic          src_pop,
  output logic [31:0]   out_data,
  output logic          out_ctrl,
  output logic          out_valid,
  input  logic          out_ready
);
  localparam int NW   = (W + 31) / 32;           // words per fragment
  localparam int NREC = 2 + NSRC * NW;           // words per record
  localparam int IW   = $clog2(NREC + 1);

  typedef enum logic [1:0] {S_IDLE, S_SEND, S_POP} state_e;

  state_e         state;
  logic [IW-1:0]  idx;                           // word of the record
  logic [23:0]    evn;
  logic           all_valid;
  logic [NW*32-1:0] frag;

  always_comb begin
    all_valid = 1'b1;
    for (int s = 0; s < NSRC; s++) all_valid &= src_valid[s];
  end

  // Payload word idx-1 belongs to source (idx-1)/NW, part (idx-1)%NW.
  always_comb begin
    int p, s, k;
    p = int'(idx) - 1;
    s = (p >= 0) ? p / NW : 0;
    k = (p >= 0) ? p % NW : 0;
    if (s >= NSRC) s = NSRC - 1;
    frag = (NW*32)'(src_data[s]);
    if (idx == '0) begin
      out_data = {8'hA0, evn};
      out_ctrl = 1'b1;
    end else if (int'(idx) == NREC - 1) begin
      out_data = {8'hF0, 8'(NSRC), 16'(NREC)};
      out_ctrl = 1'b1;
    end else begin
      out_data = frag[32*k +: 32];
      out_ctrl = 1'b0;
    end
  end

  assign out_valid = (state == S_SEND);
  assign src_pop   = (state == S_POP);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      idx   <= '0;
      evn   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (all_valid) begin
          state <= S_SEND;
          idx   <= '0;
        end
        S_SEND: if (out_ready) begin
          if (int'(idx) == NREC - 1) state <= S_POP;
          else idx <= idx + 1'b1;
        end
        S_POP: begin
          state <= S_IDLE;
          evn   <= evn + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Fragments must not disappear while a record is being sent.
  a_stable: assert property (@(posedge clk) disable iff (rst)
                             (state == S_SEND) |-> all_valid);
endmodule
