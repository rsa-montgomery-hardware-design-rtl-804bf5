// tb_s_shift_reg: checks the partial-sum register.
//
// With en high S must take d shifted right by one; with en low it must hold;
// clr must zero it and win over en. Runs at K = 32 and compares with a model
// kept in the testbench.
module tb_s_shift_reg;

  localparam int unsigned K = 32;

  logic         clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [K+2:0] d = '0;
  logic [K+1:0] s;
  longint unsigned model = 0;
  int checks = 0, failures = 0;

  s_shift_reg #(.K(K)) dut (.clk, .rst_n, .clr, .en, .d, .s);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      d   = {3'($urandom), $urandom};
      en  = ($urandom % 3) != 0;
      clr = ($urandom % 10) == 0;
      if (clr)     model = 0;
      else if (en) model = longint'(d) >> 1;
      @(posedge clk);
      #1;
      checks++;
      if (longint'(s) != model) begin
        failures++;
        $display("FAIL t=%0d s=%h expected %h", t, s, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
