// tb_data_select -- self-checking test of the one-hot way multiplexer.
module tb_data_select;
  localparam int N = 16, LINE_W = 96;
  logic [LINE_W-1:0] rd_line [N];
  logic [N-1:0] sel_onehot;
  logic [LINE_W-1:0] line;
  int checks = 0, failures = 0;

  data_select #(.N_WAYS(N), .LINE_W(LINE_W)) dut (.*);

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int s;
      for (int w = 0; w < N; w++) rd_line[w] = {$urandom, $urandom, $urandom};
      s = $urandom % (N + 1);
      sel_onehot = (s == N) ? '0 : N'(1) << s;
      #1;
      checks++;
      if (line !== ((s == N) ? '0 : rd_line[s])) begin
        failures++; $display("sel %0d wrong line", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
