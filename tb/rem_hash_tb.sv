// rem_hash_tb: checks the one-step remainder against bit-serial long
// division for random keys at every tread length 1..32, and against the
// worked example 192.128.x.y (r8 = 0x00C0, r12 = 0x0C08, r16 = 0xC080).
module rem_hash_tb;
  import suse_ref_pkg::*;
  logic [31:0] key;
  logic [5:0]  tread;
  logic [15:0] rem, q_ref, r_ref;
  int checks = 0, failures = 0;

  rem_hash dut (.key, .tread, .rem);

  task automatic check(input logic [15:0] exp, input string what);
    #1;
    checks++;
    if (rem !== exp) begin
      failures++;
      $display("FAIL %s key=%h tread=%0d rem=%h exp=%h", what, key, tread, rem, exp);
    end
  endtask

  initial begin
    key = 32'hC080_1234;
    tread = 6'd8;  check(16'h00C0, "example r8");
    tread = 6'd12; check(16'h0C08, "example r12");
    tread = 6'd16; check(16'hC080, "example r16");
    for (int n = 0; n < 3000; n++) begin
      key   = $urandom;
      tread = 6'(1 + $urandom_range(0, 31));
      ref_div(key, int'(tread), q_ref, r_ref);
      check(r_ref, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
