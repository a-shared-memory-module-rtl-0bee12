// tb_prefetch_buf: the buffer reads from a source model with a fixed latency
// that answers each request with the next word of a counter sequence, or with
// 'not valid' when the model is empty. The consumer acks randomly; the test
// checks order, no loss, no overflow, and that with data always available and
// the consumer always acking, one word is delivered every cycle after start-up.
//
// The one-word-per-cycle requirement follows the described buffer; the source
// model and ack pattern are the testbench's own.
module tb_prefetch_buf;
  localparam int LAT = 4, DEPTH = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic src_req, src_valid, valid, ack = 0, none_held;
  logic [15:0] src_data, data_out;
  logic [LAT-1:0] req_pipe = 0;
  logic [LAT-1:0][15:0] data_pipe;
  logic [LAT-1:0] vld_pipe = 0;
  int avail = 0;          // words the source holds
  int next_src = 0, next_exp = 0;

  prefetch_buf #(.W(16), .DEPTH(DEPTH), .LAT(LAT)) dut (.clk(clk), .rst_n(rst_n), .srst(1'b0),
    .src_req(src_req), .src_data(src_data), .src_valid(src_valid),
    .data_out(data_out), .valid(valid), .ack(ack), .none_held(none_held));

  always #5 clk = ~clk;

  // source model: request answered LAT cycles later
  assign src_valid = vld_pipe[LAT-1];
  assign src_data  = data_pipe[LAT-1];
  always @(posedge clk) if (rst_n) begin
    logic v;
    v = src_req && avail > 0;
    if (v) avail--;
    vld_pipe  <= {vld_pipe[LAT-2:0], v};
    data_pipe <= {data_pipe[LAT-2:0], 16'(v ? next_src : 0)};
    if (v) next_src++;
    if (ack && valid) begin
      checks++;
      if (data_out !== 16'(next_exp)) begin failures++; $display("FAIL got %0d expected %0d", data_out, next_exp); end
      next_exp++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) avail += $urandom_range(0, 3);
      ack = ($urandom_range(0, 1) == 1);
    end
    // throughput: plenty of data, ack every cycle
    ack = 0; avail += 1000;
    repeat (20) @(negedge clk);
    ack = 1;
    begin
      int start, delivered;
      start = next_exp;
      repeat (200) @(negedge clk);
      delivered = next_exp - start;
      checks++;
      if (delivered < 199) begin failures++; $display("FAIL throughput %0d words in 200 cycles", delivered); end
    end
    ack = 0; avail = 0;
    repeat (20) @(negedge clk);
    ack = 1;
    repeat (20) @(negedge clk);
    checks++;
    if (!none_held || next_exp != next_src) begin failures++; $display("FAIL drain %0d %0d", next_exp, next_src); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
