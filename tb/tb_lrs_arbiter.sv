// tb_lrs_arbiter: random requests and priority bits against a reference model
// of least-recently-served arbitration with priority override. Also checks
// that with all four ports requesting continuously the grant rotates (each
// port once in every four cycles).
//
// The arbitration rule follows the described arbiter; the random traffic is
// the testbench's own.
module tb_lrs_arbiter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, srst = 0;
  logic [3:0] request, prio, grant;
  logic update;
  int order [4];

  lrs_arbiter #(.N(4)) dut (.clk(clk), .rst_n(rst_n), .srst(srst), .request(request),
    .priority_bits(prio), .update(update), .grant(grant));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] model_grant(logic [3:0] r, logic [3:0] p, output int k_out);
    logic [3:0] eff;
    eff = ((r & p) != 0) ? (r & p) : r;
    k_out = -1;
    for (int k = 0; k < 4; k++) if (eff[order[k]]) begin k_out = k; return 4'(1 << order[k]); end
    return '0;
  endfunction

  initial begin
    int seen [4];
    request = '0; prio = '0; update = 1;
    order = '{0, 1, 2, 3};
    #12 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      logic [3:0] exp;
      int k;
      @(negedge clk);
      request = 4'($urandom);
      prio    = ($urandom_range(0, 3) == 0) ? 4'($urandom) : 4'b0;
      update  = ($urandom_range(0, 7) != 0);
      #1;
      exp = model_grant(request, prio, k);
      checks++;
      if (grant !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL req=%b prio=%b grant=%b exp=%b", request, prio, grant, exp);
      end
      if (update && k >= 0) begin
        int v;
        v = order[k];
        for (int j = k; j < 3; j++) order[j] = order[j+1];
        order[3] = v;
      end
    end
    // fairness: all requesting, no priority, each port served once per 4 grants
    @(negedge clk);
    request = 4'hF; prio = '0; update = 1;
    seen = '{0, 0, 0, 0};
    for (int i = 0; i < 4; i++) begin
      #1;
      for (int p = 0; p < 4; p++) if (grant[p]) seen[p]++;
      @(negedge clk);
    end
    checks++;
    if (seen != '{1, 1, 1, 1}) begin
      failures++;
      $display("FAIL rotation %0d %0d %0d %0d", seen[0], seen[1], seen[2], seen[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
