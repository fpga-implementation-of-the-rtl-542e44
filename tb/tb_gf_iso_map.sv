// tb_gf_iso_map: checks that the mapping is a field isomorphism between
// GF(2^8) mod m(x) (0x11B) and GF(2^8) mod m'(x) (0x11D): for every a and
// many b, map(a *' b) == map(a) * map(b), map(a ^ b) == map(a) ^ map(b), it
// is a bijection, and a second copy maps every byte back (inverse mapping).
// Products are computed here with integer shift-and-add multiplication.
module tb_gf_iso_map;
  logic [7:0] a, y, yy;
  int checks = 0, failures = 0;

  gf_iso_map dut  (.a(a),  .y(y));
  gf_iso_map dut2 (.a(y),  .y(yy));

  function automatic int gmul(int x, int z, int poly);
    int r = 0;
    for (int i = 0; i < 8; i++) begin
      if (z[i]) r ^= x;
      x <<= 1;
      if (x & 'h100) x ^= poly;
    end
    return r;
  endfunction

  int img [256];

  initial begin
    bit seen [256];
    for (int v = 0; v < 256; v++) begin
      a = 8'(v);
      #1;
      img[v] = y;
      checks++;
      if (seen[y] || yy != 8'(v)) begin
        failures++;
        $display("FAIL map %h -> %h -> %h", v, y, yy);
      end
      seen[y] = 1;
    end
    for (int x = 0; x < 256; x++) begin
      for (int z = 1; z < 256; z += 17) begin
        checks++;
        if (img[gmul(x, z, 'h11D)] != gmul(img[x], img[z], 'h11B) ||
            img[x ^ z] != (img[x] ^ img[z])) begin
          failures++;
          $display("FAIL not an isomorphism at %h, %h", x, z);
        end
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
