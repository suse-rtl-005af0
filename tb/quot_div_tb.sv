// quot_div_tb: random dividends of every length 8..32; q(x) and r(x) are
// compared with bit-serial long division and the latency with
// max(1, ceil((len-16)/4)) cycles (4 cycles for a 29..32-bit dividend).
module quot_div_tb;
  import suse_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] key;
  logic [5:0]  len;
  logic        done;
  logic [15:0] quot, rem, q_ref, r_ref;
  int checks = 0, failures = 0, cyc;

  always #5 clk = ~clk;

  quot_div #(.W(4)) dut (.clk, .rst_n, .start, .key, .len, .done, .quot, .rem);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      key   = $urandom;
      len   = 6'(8 + $urandom_range(0, 24));
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;  // clock edges since the start edge
      while (!done) begin
        @(negedge clk);
        cyc++;
      end
      ref_div(key, int'(len), q_ref, r_ref);
      checks += 3;
      if (quot !== q_ref || rem !== r_ref) begin
        failures++;
        $display("FAIL key=%h len=%0d q=%h/%h r=%h/%h", key, len, quot, q_ref, rem, r_ref);
      end
      if (cyc != ((len <= 16) ? 1 : (int'(len) - 16 + 3) / 4)) begin
        failures++;
        $display("FAIL latency len=%0d cycles=%0d", len, cyc);
      end
      if (len >= 29 && cyc != 4) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
