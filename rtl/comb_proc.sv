// comb_proc: pacing strobe for the LCD driver.
//
// Divides the system clock by CLK_DIV = CLK_HZ / ENABLE_HZ and emits `enable`, a
// one-clock strobe once per division period, which advances the whole driver by one
// display byte. The original design asks for a 3 MHz enable; with the assumed 50 MHz system
// clock the integer divider is 16, giving 3.125 MHz.
// It also emits `cp_win`, high during the middle half of each period
// (phase CLK_DIV/4 .. 3*CLK_DIV/4-1). sync_out gates CP and LOAD with it, so those
// pulses sit well clear of the enable edge where the data bus changes. That window is
// this design's choice; the original timing chart only shows data stable around each CP pulse.
// Timing: `enable` is high in the cycle where the phase counter equals CLK_DIV-1.
module comb_proc #(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned ENABLE_HZ = 3_000_000,
  parameter int unsigned CLK_DIV   = CLK_HZ / ENABLE_HZ
) (
  input  logic clk,
  input  logic rst_n,
  output logic enable,
  output logic cp_win
);
  localparam int unsigned PW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;
  localparam logic [PW-1:0] LAST   = PW'(CLK_DIV - 1);
  localparam logic [PW-1:0] WIN_LO = PW'(CLK_DIV / 4);
  localparam logic [PW-1:0] WIN_HI = PW'((3 * CLK_DIV) / 4);

  logic [PW-1:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              phase <= '0;
    else if (phase == LAST)  phase <= '0;
    else                     phase <= phase + 1'b1;
  end

  assign enable = (phase == LAST);
  assign cp_win = (phase >= WIN_LO) && (phase < WIN_HI);

  initial assert (CLK_DIV >= 4) else $error("comb_proc: CLK_DIV must be at least 4");
endmodule
