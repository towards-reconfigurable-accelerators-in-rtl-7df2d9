// tb_cnn_activation: random signed lanes through both activation modes and all shifts;
// checks every lane against a model (ReLU clamp, then arithmetic right shift).
module tb_cnn_activation;
  import cnn_pkg::*;
  localparam int N = 16;
  act_e        cfg_act;
  logic [3:0]  cfg_shift;
  logic [15:0] x [N], y [N];
  int checks = 0, failures = 0;

  cnn_activation #(.NUM_MK(N)) dut (.cfg_act, .cfg_shift, .x, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      cfg_act   = act_e'($urandom_range(0, 1));
      cfg_shift = 4'($urandom);
      if (i < 100) cfg_shift = 0;
      for (int m = 0; m < N; m++) x[m] = 16'($urandom);
      #1;
      for (int m = 0; m < N; m++) begin
        int v;
        v = $signed(x[m]);
        if (cfg_act == ACT_RELU && v < 0) v = 0;
        v = v >>> cfg_shift;
        checks++;
        if (y[m] !== 16'(v)) begin
          failures++;
          if (failures < 5) $display("lane %0d: x=%h y=%h expected %h", m, x[m], y[m], 16'(v));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
