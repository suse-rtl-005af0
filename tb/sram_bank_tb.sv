// sram_bank_tb: random writes and reads of a full-size module (2^13 x 164)
// against a shadow array; checks the one-cycle read latency and that rdata
// holds between reads and across writes.
module sram_bank_tb;
  logic clk = 0, en = 0, we = 0;
  logic [12:0]  addr;
  logic [163:0] wdata, rdata, hold;
  logic [163:0] shadow [int];
  int checks = 0, failures = 0, a;

  always #5 clk = ~clk;

  sram_bank #(.ROWS_LOG2(13), .SET_W(164)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  function automatic logic [163:0] rnd164();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, 4'($urandom)};
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      a = $urandom_range(0, 8191);
      if (!shadow.exists(a) || $urandom_range(0, 1) == 0) begin
        en = 1; we = 1; addr = 13'(a); wdata = rnd164();
        shadow[a] = wdata;
        hold = rdata;
        @(negedge clk);
        en = 0; we = 0;
        checks++;
        if (rdata !== hold) begin failures++; $display("FAIL rdata changed on write"); end
      end else begin
        en = 1; we = 0; addr = 13'(a);
        @(negedge clk);
        en = 0;
        checks++;
        if (rdata !== shadow[a]) begin failures++; $display("FAIL read %0d", a); end
        @(negedge clk);
        checks++;
        if (rdata !== shadow[a]) begin failures++; $display("FAIL hold %0d", a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
