// tb_addr_decoder: exhaustive test of the 3-to-8 decoder with enable.
//
// For every address and both enable values, the expected select is
// computed as a shift of 1 (or zero when disabled) and compared.
module tb_addr_decoder;
  localparam int AW = 3;
  logic              en;
  logic [AW-1:0]     addr;
  logic [2**AW-1:0]  sel;
  int checks = 0, failures = 0;

  addr_decoder #(.ADDR_W(AW)) dut (.en, .addr, .sel);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int a = 0; a < 2**AW; a++) begin
        logic [2**AW-1:0] exp;
        en = 1'(e);
        addr = AW'(a);
        exp = (e != 0) ? (2**AW)'(1) << a : '0;
        #1;
        checks++;
        if (sel !== exp) begin
          failures++;
          $display("FAIL en=%0d addr=%0d sel=%b expected %b", e, a, sel, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
