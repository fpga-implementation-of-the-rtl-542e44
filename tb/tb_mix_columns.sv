// tb_mix_columns: compares MixColumns and InvMixColumns with the reference
// model for a FIPS-197 example state and random states, and checks that the
// two directions undo each other.
module tb_mix_columns;
  import aes_ref_pkg::*;
  logic [127:0] s, fwd, back;
  int checks = 0, failures = 0;

  mix_columns #(.INVERSE(1'b0)) dut_f (.state_in(s),   .state_out(fwd));
  mix_columns #(.INVERSE(1'b1)) dut_i (.state_in(fwd), .state_out(back));

  initial begin
    // FIPS-197 Appendix B, round 1: after ShiftRows -> after MixColumns.
    s = 128'hd4bf5d30e0b452aeb84111f11e2798e5;
    #1;
    checks++;
    if (fwd != 128'h046681e5e0cb199a48f8d37a2806264c) begin
      failures++; $display("FAIL FIPS example: %h", fwd);
    end
    for (int n = 0; n < 200; n++) begin
      s = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (fwd != ref_mix_columns(s, 0) || back != s || ref_mix_columns(fwd, 1) != s) begin
        failures++; $display("FAIL %h -> %h -> %h", s, fwd, back);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
