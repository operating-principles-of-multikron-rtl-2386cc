// mk_cpuid_enc: encodes the N (eight) unencoded CPU ID lines, of which only
// one should be active, into the three-bit CPU ID carried in a sample header
// and used to pick the source address register. Lines are active high and,
// should several be active, the lowest-numbered one wins (both are this
// design's choices). Purely combinational.
module mk_cpuid_enc #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]         lines,
  output logic [$clog2(N)-1:0] id,
  output logic                 valid
);
  always_comb begin
    id = '0;
    valid = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      if (lines[i]) begin
        id = i[$clog2(N)-1:0];
        valid = 1'b1;
      end
    end
  end
endmodule
