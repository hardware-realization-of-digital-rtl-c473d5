// walsh_gen: forms the Walsh functions psi(0..2^N-1) from the Rademacher
// functions R1..RN.
//
// In Paley order psi(n,x) is the product of R_(i+1)(x) over the bits i that
// are set in n (psi(0) = 1). With +1 carried as logic 0 and -1 as logic 1,
// a product of +/-1 values is the XOR of their bits, so each Walsh function
// is the XOR of the Rademacher bits selected by n.
//
// Interface: rad[k] is R_k, walsh[n] is psi(n) (1 means -1). Purely
// combinational; terms whose coefficient is zero are removed downstream by
// synthesis.
module walsh_gen #(
  parameter int unsigned NUM_RAD = 6
) (
  input  logic [NUM_RAD:1]         rad,
  output logic [(1<<NUM_RAD)-1:0]  walsh
);

  always_comb begin
    for (int n = 0; n < (1 << NUM_RAD); n++) begin
      walsh[n] = 1'b0;
      for (int i = 0; i < NUM_RAD; i++)
        if (n[i]) walsh[n] = walsh[n] ^ rad[i+1];
    end
  end

endmodule
