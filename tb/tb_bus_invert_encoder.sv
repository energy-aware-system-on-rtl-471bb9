// tb_bus_invert_encoder: drives random and adversarial words and checks, for
// each load, the coded lines against a reference of the majority rule, that at
// most W/2 data lines toggle, that the lines hold when nothing is loaded, and
// that the word is recoverable from lines and invert bit.
module tb_bus_invert_encoder;
  localparam int W = 32;
  logic clk = 0, rst_n = 0, load = 0;
  logic [W-1:0] data, bus;
  logic inv;
  int checks = 0, failures = 0, inverted = 0;

  bus_invert_encoder #(.W(W)) dut (.clk, .rst_n, .load_i(load), .data_i(data), .bus_o(bus), .inv_o(inv));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    logic [W-1:0] prev_bus, exp_bus;
    logic exp_inv;
    data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(bus == '0 && inv == 0, "reset value");
    for (int n = 0; n < 2000; n++) begin
      prev_bus = bus;
      case (n % 4)
        0: data = $urandom;
        1: data = ~prev_bus ^ W'(1 << ($urandom % W));   // W-1 toggles: must invert
        2: data = prev_bus ^ W'(32'h0000_ffff);           // exactly W/2 toggles: must not
        default: data = prev_bus ^ W'(32'h0001_ffff);     // W/2+1 toggles: must invert
      endcase
      exp_inv = ($countones(data ^ prev_bus) > W / 2);
      exp_bus = exp_inv ? ~data : data;
      load = ($urandom % 5) != 0;
      @(negedge clk);
      if (load) begin
        if (exp_inv) inverted++;
        check(bus == exp_bus && inv == exp_inv, $sformatf("coded word n=%0d", n));
        check($countones(bus ^ prev_bus) <= W / 2, "toggle bound");
        check((bus ^ {W{inv}}) == data, "recoverable");
      end else begin
        check(bus == prev_bus, "lines hold without load");
      end
      load = 0;
    end
    check(inverted > 100, "inversion exercised");
    $display("inverted transfers: %0d", inverted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
