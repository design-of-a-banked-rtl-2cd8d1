// Exhaustive test of the 4-input priority encoder against its truth table:
// Y = number of the highest set input, EN = any input set.
module tb_priority_encoder;
  logic [3:0] x;
  logic [1:0] y;
  logic       en;
  int checks = 0, failures = 0;

  priority_encoder dut (.x, .y, .en);

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [1:0] ey;
      logic       een;
      x = 4'(v);
      #1;
      een = (v != 0);
      ey  = (v >= 8) ? 2'd3 : (v >= 4) ? 2'd2 : (v >= 2) ? 2'd1 : 2'd0;
      checks++;
      if (en !== een || (een && y !== ey)) begin
        failures++;
        $display("FAIL x=%b y=%0d en=%0b expected y=%0d en=%0b", x, y, en, ey, een);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
