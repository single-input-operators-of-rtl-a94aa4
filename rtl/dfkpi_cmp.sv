// dfkpi_cmp: the CMP comparator that sits beside the CP input register.
//
// It looks at the matching function DST.MF of the token just loaded at CP.DI and
// splits the token stream in two: label B (bypass, the consumer is a single input
// operator) sends the token straight on to the Load/Fetch register, label M
// (match, the consumer is a double input operator) sends it to operand matching.
// For a token that must be matched it also forms the address of its item in the
// Frame Store, the matching-vector base MVB plus the matching index IX
// (direct operand matching: no associative search).
//
// Purely combinational. The B/M split is the one drawn at CMP in the CP pipeline;
// forming the item address as MVB + IX (modulo the Frame Store size) is this
// design's reading of "stored ... in the Matching Vector specified by base address
// of the MVB operand, into the item specified by index IX".
module dfkpi_cmp
  import dfkpi_pkg::*;
(
  input  token_t           tok,       // content of the CP register
  input  logic             tok_valid, // the CP register holds a token
  output logic             bypass,    // B: go to LFR without matching
  output logic             match,     // M: go to operand matching
  output logic [MVB_W-1:0] fs_addr    // Frame Store item of this operand
);

  always_comb begin
    bypass  = tok_valid && (tok.dst.mf == MF_B);
    match   = tok_valid && (tok.dst.mf == MF_M);
    fs_addr = tok.mvb + MVB_W'(tok.ix);
  end

endmodule
