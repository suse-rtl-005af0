// mem_scheduler_tb: random pending masks and module IDs. Each cycle's grant
// must be a subset of pending, give every module with a pending access
// exactly one grant, and pick the lowest-index access of that module.
// Draining a request set must take as many batches as the most-loaded
// module has accesses (8 when all eight go to one module, 1 when all differ).
module mem_scheduler_tb;
  logic [7:0] pending, grant, p;
  logic [2:0] mod_id [8];
  int checks = 0, failures = 0, batches, load [8], maxload;

  mem_scheduler #(.NREQ(8)) dut (.pending, .mod_id, .grant);

  task automatic run_set(input int expect_batches);
    p = 8'hFF;
    batches = 0;
    while (p != 0) begin
      pending = p; #1;
      for (int m = 0; m < 8; m++) begin
        int first;
        first = -1;
        for (int i = 0; i < 8; i++) if (p[i] && mod_id[i] == 3'(m) && first < 0) first = i;
        for (int i = 0; i < 8; i++) begin
          if (mod_id[i] == 3'(m)) begin
            checks++;
            if (grant[i] !== (i == first)) begin
              failures++;
              $display("FAIL grant=%b pending=%b i=%0d", grant, p, i);
            end
          end
        end
      end
      p = p & ~grant;
      batches = batches + 1;
      if (batches > 8) break;
    end
    checks++;
    if (batches != expect_batches) begin
      failures++;
      $display("FAIL batches=%0d expected=%0d", batches, expect_batches);
    end
  endtask

  initial begin
    #1;
    for (int i = 0; i < 8; i++) mod_id[i] = 3'(i);
    run_set(1);
    for (int i = 0; i < 8; i++) mod_id[i] = 3'd5;
    run_set(8);
    for (int n = 0; n < 500; n++) begin
      for (int m = 0; m < 8; m++) load[m] = 0;
      for (int i = 0; i < 8; i++) begin
        mod_id[i] = 3'($urandom_range(0, 7));
        load[mod_id[i]]++;
      end
      maxload = 0;
      for (int m = 0; m < 8; m++) if (load[m] > maxload) maxload = load[m];
      run_set(maxload);
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
