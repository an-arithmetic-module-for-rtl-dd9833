// Load select of the byte-slice module.
//
// Turns the three load controls into the clock enables of the three holding
// registers. LOADX loads the argument holding register and overrides the
// others; otherwise LOADE loads the p holding register (REGLS = 1) or the q
// holding register (REGLS = 0). The decoding is the document's; the module is
// purely combinational.
module bbm_load_select (
  input  logic loadx,   // load the argument
  input  logic loade,   // load a coefficient
  input  logic regls,   // 1: p, 0: q
  output logic loadxh,  // enable of XHREG
  output logic loadqh,  // enable of QHREG
  output logic loadph   // enable of PHREG
);
  always_comb begin
    loadxh = loadx;
    loadqh = !loadx && loade && !regls;
    loadph = !loadx && loade &&  regls;
  end
endmodule
