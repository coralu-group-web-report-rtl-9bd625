// tb_cordic_reg: self-checking test of the enabled data path register.
//
// Checks the asynchronous reset to zero, then drives random data with a
// random enable for many cycles and compares q after every clock edge with a
// model that loads on enable and holds otherwise.
module tb_cordic_reg;
  localparam int unsigned W = 16;
  logic clk = 0, rst_n = 1, en = 0;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  cordic_reg #(.WIDTH(W)) dut (.clk, .rst_n, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset value %h", q); end
    #9 rst_n = 1;
    model = '0;
    repeat (1000) begin
      @(negedge clk);
      en = 1'($urandom);
      d  = W'($urandom);
      @(posedge clk);
      if (en) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL en=%b d=%h q=%h expected %h", en, d, q, model);
      end
    end
    // asynchronous reset in the middle of a cycle
    @(negedge clk);
    #2 rst_n = 0;
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL async reset q=%h", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
