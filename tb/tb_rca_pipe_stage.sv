// tb_rca_pipe_stage: drives one 4-bit accumulator slice with random FCW
// bits and random carry-ins for many cycles and checks, every cycle, the
// registered phase bits and carry against an integer model
// {cout, acc} <= acc + fcw + cin (one cycle latency). Also checks reset.
module tb_rca_pipe_stage;
  localparam int W = 4;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] fcw, acc;
  logic cin, cout;
  int checks = 0, failures = 0;
  int unsigned ref_acc, ref_c, nxt;
  int wraps = 0;

  rca_pipe_stage #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .fcw(fcw), .cin(cin),
                                   .acc(acc), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fcw = '0; cin = 0;
    ref_acc = 0; ref_c = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (acc != 0 || cout != 0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks++;
      if (acc != W'(ref_acc) || cout != ref_c[0]) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d acc=%h exp %h cout=%0b exp %0b",
                                    n, acc, ref_acc, cout, ref_c);
      end
      fcw = W'($urandom);
      cin = 1'($urandom);
      nxt = ref_acc + 32'(fcw) + 32'(cin);
      ref_acc = nxt % (1 << W);
      ref_c = nxt >> W;
      wraps += ref_c;
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no carry out seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
