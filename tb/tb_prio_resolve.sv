// tb_prio_resolve: exhaustive check of the priority resolution network.
// Every request pattern is applied under every ordering of the four ports; the
// expected grant is the requesting port found first in the order, and sp must
// mark its position unless that is the last position.
//
// The expected grant follows the described network; checking exhaustively is
// the testbench's own choice.
module tb_prio_resolve;
  int checks = 0, failures = 0;
  logic [3:0]      request, grant;
  logic [3:0][1:0] pos;
  logic [2:0]      sp;

  prio_resolve #(.N(4)) dut (.request(request), .pos(pos), .grant(grant), .sp(sp));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++)
    for (int c = 0; c < 4; c++) for (int d = 0; d < 4; d++) begin
      if (a == b || a == c || a == d || b == c || b == d || c == d) continue;
      for (int r = 0; r < 16; r++) begin
        logic [3:0] exp_g;
        logic [2:0] exp_sp;
        int order [4];
        order = '{a, b, c, d};
        pos[0] = 2'(a); pos[1] = 2'(b); pos[2] = 2'(c); pos[3] = 2'(d);
        request = 4'(r);
        exp_g = '0; exp_sp = '0;
        for (int k = 0; k < 4; k++) if (request[order[k]]) begin
          exp_g[order[k]] = 1'b1;
          if (k < 3) exp_sp[k] = 1'b1;
          break;
        end
        #1;
        checks++;
        if (grant !== exp_g || sp !== exp_sp) begin
          failures++;
          $display("FAIL pos=%0d%0d%0d%0d req=%b grant=%b exp=%b sp=%b exp=%b",
                   a, b, c, d, request, grant, exp_g, sp, exp_sp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
