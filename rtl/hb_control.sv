// hb_control: commutator and sequencer of the half-band second stage.
//
// Input samples alternate between the two polyphase branches: the first
// sample after reset and every second one after it (phase 0, "even") go to
// the rotating top register, the others (phase 1, "odd") to the bottom delay
// line.  An even sample starts a computation: on its own clock the selector
// S is 0 (shift_in) and the accumulator is cleared; on the NP following
// clocks S is 1 (rotate) and one product is accumulated per clock with ROM
// address NP-1, NP-2, ..., 0; the last of them (last) also forms the output.
// The computation therefore takes NP+1 = 14 clocks, so even samples must be
// at least 14 clocks apart (input samples at least 7 apart); an assertion
// checks this.  Synchronous active-high reset.
module hb_control
  import decim_pkg::*;
#(
  parameter int unsigned NP = HB_NP
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  output logic                     even,      // branch of the current sample
  output logic                     shift_in,  // S = 0 clock
  output logic                     odd_en,    // shift the bottom register
  output logic                     rotate,    // S = 1 clock
  output logic [$clog2(NP)-1:0]    addr,
  output logic                     clear,
  output logic                     mac,
  output logic                     last,
  output logic                     busy
);
  logic                    phase;              // 0: next sample is even
  logic [$clog2(NP+1)-1:0] cnt;                // 1..NP while busy

  assign even     = ~phase;
  assign shift_in = in_valid & ~phase;
  assign odd_en   = in_valid &  phase;
  assign clear    = shift_in;
  assign rotate   = busy;
  assign mac      = busy;
  assign addr     = busy ? ($clog2(NP))'(NP - cnt) : '0;
  assign last     = busy && (cnt == ($clog2(NP+1))'(NP));

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= 1'b0;
      busy  <= 1'b0;
      cnt   <= '0;
    end else begin
      if (in_valid) phase <= ~phase;
      if (shift_in) begin
        busy <= 1'b1;
        cnt  <= ($clog2(NP+1))'(1);
      end else if (busy) begin
        cnt <= cnt + 1'b1;
        if (last) busy <= 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(shift_in && busy))
    else $error("hb_control: even sample arrived before the previous output was complete");
endmodule
