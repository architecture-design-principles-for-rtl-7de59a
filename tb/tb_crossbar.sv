// tb_crossbar: self-checking testbench of the switch crossbar.
//
// Applies random flits on all inputs with random select matrices (one-hot or
// empty per output) and compares each output with the input the testbench
// selected, or with zero for an unselected output.
module tb_crossbar;

  localparam int N = 4;
  localparam int W = 34;

  logic [N-1:0][W-1:0] in_v;
  logic [N-1:0][N-1:0] sel;
  logic [N-1:0][W-1:0] out_v;
  logic [W-1:0] exp_v;
  int checks = 0, failures = 0;

  crossbar #(.N_IN(N), .N_OUT(N), .W(W)) dut (.in_i(in_v), .sel_i(sel), .out_o(out_v));

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int src [N];
      for (int i = 0; i < N; i++) in_v[i] = {$urandom, 2'($urandom)};
      for (int o = 0; o < N; o++) begin
        src[o] = $urandom_range(N);          // N means "no input"
        sel[o] = (src[o] < N) ? N'(1) << src[o] : '0;
      end
      #1;
      for (int o = 0; o < N; o++) begin
        exp_v = (src[o] < N) ? in_v[src[o]] : '0;
        checks++;
        if (out_v[o] !== exp_v) begin
          failures++;
          if (failures <= 20) $display("ERROR: out %0d = %h expected %h", o, out_v[o], exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
