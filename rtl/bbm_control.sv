// Control logic of the byte-slice module.
//
// START = 1 makes the active registers take the holding registers at the next
// clock: SELW steers PHREG into WSREG and zeroes into WCREG, LOADXQ loads
// XREG and QREG, and CLRD clears the digit register. DIGITE is START delayed
// by one clock; it is high during the first basic cycle after START, when the
// incoming digits must count as zero. If START stays high, every clock
// restarts basic cycle 0. The DIGITE flip-flop and the DREG clear are this
// design's choice of timing; the document names the signals and their
// purpose. There is no reset: START initialises the slice.
module bbm_control (
  input  logic clock,
  input  logic start,
  output logic selw,    // initialise w from p
  output logic loadxq,  // load the active x and q registers
  output logic clrd,    // clear DREG
  output logic digite   // first basic cycle: force digits to zero
);
  always_ff @(posedge clock) digite <= start;

  always_comb begin
    selw   = start;
    loadxq = start;
    clrd   = start;
  end
endmodule
