// anyorall: agreement test on four copies of one bit.
// ANY is the OR of the four inputs, ALL their AND, and NOTALL = ANY xor ALL,
// which is high exactly when the four copies disagree. The gate structure is
// the one of the DDU schematic macro of the same name. Purely combinational.
module anyorall (
  input  logic [3:0] b,
  output logic       any_o,
  output logic       all_o,
  output logic       notall_o
);
  always_comb begin
    any_o    = |b;
    all_o    = &b;
    notall_o = any_o ^ all_o;
  end
endmodule
