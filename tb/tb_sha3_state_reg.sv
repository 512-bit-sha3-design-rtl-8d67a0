// tb_sha3_state_reg: checks the input multiplexer (data entry XOR Reg A
// with Ctrl 1 low, Reg A with Ctrl 1 high) and Reg A's load, hold, clear
// and reset-to-zero behaviour against a model register kept in the bench.
module tb_sha3_state_reg;
  import sha3_pkg::*;
  import sha3_ref_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   ctrl1 = 1'b0, en = 1'b0, clr = 1'b0;
  state_t data, cbox, mux;
  state_t model = '0;
  int checks = 0, failures = 0;

  sha3_state_reg dut (.clk_i(clk), .rst_ni(rst_n), .ctrl1_i(ctrl1), .en_i(en),
                      .clr_i(clr), .data_i(data), .cbox_i(cbox), .mux_o(mux));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data = to_packed(rand_state());
    cbox = to_packed(rand_state());
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      data  = to_packed(rand_state());
      cbox  = to_packed(rand_state());
      ctrl1 = 1'($urandom_range(0, 1));
      en    = 1'($urandom_range(0, 3) != 0);
      clr   = 1'($urandom_range(0, 9) == 0);
      #1;
      checks++;
      if (mux !== (ctrl1 ? model : (model ^ data))) begin
        failures++;
        $display("FAIL mux, step %0d ctrl1=%0b", n, ctrl1);
      end
      @(posedge clk);
      if (clr)     model = '0;
      else if (en) model = cbox;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
