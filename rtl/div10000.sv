// div10000: divide a signed value by 10000 with shifts and adds.
//
// 1/10000 is approximated by 13421/2^27 (relative error 5e-5), where
// 13421 = 2^13 + 2^12 + 2^10 + 2^6 + 2^5 + 2^3 + 2^2 + 1, so the quotient is
// the sum of eight shifted copies of |din| shifted right by 27, with the sign
// put back afterwards (the quotient rounds toward zero). This is the
// divide-by-10000 unit the design uses to undo the 10000x scaling of the
// Gaussian-derivative weights; the sign handling is this implementation's.
//
// Purely combinational.
module div10000 #(
  parameter int IN_W = 24
) (
  input  logic signed [IN_W-1:0] din,
  output logic signed [IN_W-1:0] dout
);

  localparam int PW = IN_W + 14;

  logic [IN_W-1:0] mag;
  logic [PW-1:0]   m, prod, q;

  always_comb begin
    mag  = din[IN_W-1] ? IN_W'(-din) : IN_W'(din);
    m    = PW'(mag);
    prod = (m << 13) + (m << 12) + (m << 10) + (m << 6)
         + (m << 5)  + (m << 3)  + (m << 2)  + m;
    q    = prod >> 27;
    dout = din[IN_W-1] ? -$signed(IN_W'(q)) : $signed(IN_W'(q));
  end

endmodule
