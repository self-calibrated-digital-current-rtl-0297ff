// hyst_comparator: digital comparators and SR latch of the hysteretic
// current-mode controller.
//
// Two digital comparators watch the emulated current i'_L: reaching the
// lower threshold sets the latch, reaching the upper one resets it. The
// latch output c[n] is the switching command: c = 1 applies a positive
// inductor voltage (current rises), c = 0 a negative one (current falls),
// so the current swings between the two thresholds cycle by cycle with no
// slope compensation and a frequency that follows the ripple. Because the
// comparisons run on the emulated current they see no switching noise.
// While the converter is off (run low) the latch is preset to the state
// that builds current in the direction of the line polarity (c = pol), so
// that the first cycle after a restart starts correctly; reset has priority
// if both thresholds are met at once. These two details are this design's.
//
// Interface: currents are emu_pkg::cur_t; c is registered, so it changes
// one clock after the threshold is reached.
module hyst_comparator
  import emu_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic run,
  input  logic pol,
  input  cur_t il,
  input  cur_t th_hi,
  input  cur_t th_lo,
  output logic c,
  output logic set_hit,    // i'_L at or below th_lo (comparator S)
  output logic rst_hit     // i'_L at or above th_hi (comparator R)
);

  assign set_hit = (il <= th_lo);
  assign rst_hit = (il >= th_hi);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       c <= 1'b0;
    else if (!run)    c <= pol;
    else if (rst_hit) c <= 1'b0;
    else if (set_hit) c <= 1'b1;
  end

endmodule
