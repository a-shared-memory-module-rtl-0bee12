// tb_mutex_prim: scenario test of the test-and-set lock.
//  - a lone request is granted in the next cycle (two-cycle grant path)
//  - a second requester waits while the lock is held
//  - a release by a port that is not the owner is ignored
//  - on the owner's release the waiting port is granted at once
//  - with three waiters the priority bit wins; then least recently served
//    (port 2, never served, before port 0)
// A port drops its request in the cycle after it sees its grant, as an input
// port does.
//
// Grant order and the ignored release by a non-owner follow the described
// mutex; the request sequence is the testbench's own.
module tb_mutex_prim;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, srst = 0;
  logic [3:0] req = 0, rel = 0, prio = 0, grant, owner;

  mutex_prim #(.N(4)) dut (.clk(clk), .rst_n(rst_n), .srst(srst), .req(req), .rel(rel),
    .priority_bits(prio), .grant(grant), .owner(owner));

  always #5 clk = ~clk;

  // requester behaviour: drop the request after the grant
  always @(posedge clk) req <= req & ~grant;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_grant(input logic [3:0] g, input string what);
    checks++;
    if (grant !== g) begin
      failures++;
      $display("FAIL %s: grant=%b expected %b", what, grant, g);
    end
  endtask

  task automatic wait_grant(input logic [3:0] g, input int max_cycles, output int cycles);
    cycles = 0;
    while (grant !== g && cycles < max_cycles) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    int n;
    #12 rst_n = 1;
    @(negedge clk);
    req[0] = 1;                       // cycle c
    @(negedge clk);                   // cycle c+1
    expect_grant(4'b0001, "first grant after one cycle");
    @(negedge clk);
    checks++; if (owner !== 4'b0001) begin failures++; $display("FAIL owner"); end
    req[1] = 1;
    repeat (4) begin @(negedge clk); expect_grant(4'b0000, "held lock"); end
    rel[2] = 1;                       // not the owner: ignored
    @(negedge clk); rel = 0;
    repeat (2) begin @(negedge clk); expect_grant(4'b0000, "foreign release"); end
    rel[0] = 1;
    @(negedge clk); rel = 0;
    expect_grant(4'b0010, "hand-over on release");
    @(negedge clk);
    checks++; if (owner !== 4'b0010) begin failures++; $display("FAIL owner after hand-over"); end
    // three waiters, port 3 has priority
    req[0] = 1; req[2] = 1; req[3] = 1; prio = 4'b1000;
    @(negedge clk); @(negedge clk);
    rel[1] = 1; @(negedge clk); rel = 0;
    expect_grant(4'b1000, "priority override");
    prio = 0;
    @(negedge clk);
    rel[3] = 1; @(negedge clk); rel = 0;
    expect_grant(4'b0100, "least recently served (port 2, never served)");
    @(negedge clk);
    rel[2] = 1; @(negedge clk); rel = 0;
    expect_grant(4'b0001, "remaining waiter");
    @(negedge clk);
    rel[0] = 1; @(negedge clk); rel = 0;
    @(negedge clk);
    checks++; if (owner !== 4'b0000) begin failures++; $display("FAIL lock not free"); end
    // two-cycle minimum
    req[3] = 1;
    wait_grant(4'b1000, 10, n);
    checks++; if (n != 1) begin failures++; $display("FAIL grant took %0d cycles", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
