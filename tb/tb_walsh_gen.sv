// tb_walsh_gen: drives every combination of Rademacher values and checks
// each Walsh function against the +/-1 product of Eq. 5, and checks the
// first eight Walsh functions over one period against their known
// sequences (psi(1) = R1, psi(3) = R1*R2, ...).
module tb_walsh_gen;
  import walsh_ref_pkg::*;

  localparam int NRAD = 6;
  localparam int M    = 1 << NRAD;

  logic [NRAD:1] rad;
  logic [M-1:0]  walsh;

  int checks = 0, failures = 0;

  walsh_gen #(.NUM_RAD(NRAD)) dut (.rad(rad), .walsh(walsh));

  initial begin
    #100000ns;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Exhaustive product check.
    for (int r = 0; r < M; r++) begin
      rad = NRAD'(r);
      #1;
      for (int n = 0; n < M; n++) begin
        checks++;
        if (walsh[n] !== (walsh_sign(n, r, NRAD) < 0)) begin
          failures++;
          $display("rad=%b walsh[%0d]=%0b", rad, n, walsh[n]);
        end
      end
    end
    // Waveforms over one period at 8-step resolution: sign change pattern of
    // psi(0..7) in Paley order (bit j of pattern = value in step j, 1 = -1).
    begin
      automatic logic [7:0] expect_w [8] = '{
        8'b0000_0000, 8'b1111_0000, 8'b1100_1100, 8'b0011_1100,
        8'b1010_1010, 8'b0101_1010, 8'b0110_0110, 8'b1001_0110 };
      for (int j = 0; j < 8; j++) begin
        for (int n = 0; n < NRAD; n++) rad[n+1] = rad_bit(n, j * (M / 8), NRAD);
        #1;
        for (int n = 0; n < 8; n++) begin
          checks++;
          if (walsh[n] !== expect_w[n][j]) begin
            failures++;
            $display("step %0d psi(%0d)=%0b expected %0b", j, n, walsh[n], expect_w[n][j]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
