// tb_ks_adder: compares the Kogge-Stone adder with the + operator at the
// default 16 bits and at 8 bits, for corner cases (full carry ripple,
// all ones) and random operands.
module tb_ks_adder;
  logic [15:0] x, y, s;
  logic        co;
  logic [7:0]  x8, y8, s8;
  logic        co8;
  int checks = 0, failures = 0;

  ks_adder dut (.x, .y, .sum(s), .cout(co));
  ks_adder #(.WIDTH(8)) dut8 (.x(x8), .y(y8), .sum(s8), .cout(co8));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [16:0] ref16;
    logic [8:0]  ref8;
    for (int n = 0; n < 2000; n++) begin
      case (n)
        0: begin x = 16'hFFFF; y = 16'h0001; end
        1: begin x = 16'hFFFF; y = 16'hFFFF; end
        2: begin x = 16'h0000; y = 16'h0000; end
        3: begin x = 16'h7FFF; y = 16'h0001; end
        default: begin x = 16'($urandom); y = 16'($urandom); end
      endcase
      x8 = x[7:0]; y8 = y[15:8];
      #1;
      ref16 = {1'b0, x} + {1'b0, y};
      ref8  = {1'b0, x8} + {1'b0, y8};
      checks++;
      if ({co, s} != ref16) begin
        failures++;
        $display("FAIL %h + %h = %h, got %h", x, y, ref16, {co, s});
      end
      checks++;
      if ({co8, s8} != ref8) begin
        failures++;
        $display("FAIL 8-bit %h + %h = %h, got %h", x8, y8, ref8, {co8, s8});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
