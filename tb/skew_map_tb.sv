// skew_map_tb: the worked example (r8, r12, r16 of 192.128.x.y with skews
// 0, 1, 3 go to modules 0, 1, 2), random checks against the mapping
// equation, and a check that for each skew the mapping of a block of eight
// consecutive remainders onto the eight modules is a permutation.
module skew_map_tb;
  import suse_ref_pkg::*;
  logic [15:0] rem;
  logic [3:0]  skew;
  logic [2:0]  mod_id;
  logic [12:0] row;
  int checks = 0, failures = 0, m_ref, r_ref;
  logic [7:0] seen;

  skew_map dut (.rem, .skew, .mod_id, .row);

  task automatic check(input int em, input int er);
    #1;
    checks++;
    if (int'(mod_id) != em || int'(row) != er) begin
      failures++;
      $display("FAIL rem=%h skew=%0d mod=%0d/%0d row=%0d/%0d", rem, skew, mod_id, em, row, er);
    end
  endtask

  initial begin
    rem = 16'h00C0; skew = 0; check(0, 24);
    rem = 16'h0C08; skew = 1; check(1, 385);
    rem = 16'hC080; skew = 3; check(2, 6160);
    for (int n = 0; n < 4000; n++) begin
      rem  = 16'($urandom);
      skew = 4'($urandom_range(0, 8));
      ref_map(rem, int'(skew), m_ref, r_ref);
      check(m_ref, r_ref);
    end
    for (int s = 0; s <= 8; s++) begin
      for (int base = 0; base < 65536; base += 8 * 97) begin
        seen = '0;
        for (int k = 0; k < 8; k++) begin
          rem = 16'(base + k); skew = 4'(s); #1;
          seen[mod_id] = 1'b1;
        end
        checks++;
        if (seen != 8'hFF) begin
          failures++;
          $display("FAIL not a permutation skew=%0d base=%0d", s, base);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
