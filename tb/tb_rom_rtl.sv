// tb_rom_rtl: self-checking test of the DA lookup table.
// Two tables with different coefficient sets are read at all 16 addresses;
// each entry is compared with the sum of the coefficients whose address bit
// is set, address bit 3 selecting b0 and bit 0 selecting b3 (so 1000 -> b0,
// 0001 -> b3, 1100 -> b0+b1). The extreme set checks that the 10-bit entry
// cannot overflow.
module tb_rom_rtl;
  localparam logic signed [7:0] C1 [4] = '{8'sd17, -8'sd5, 8'sd100, -8'sd64};
  localparam logic signed [7:0] C2 [4] = '{-8'sd128, -8'sd128, -8'sd128, -8'sd128};

  logic [3:0] addr;
  logic signed [9:0] d1, d2;
  int checks = 0, failures = 0;

  rom_rtl #(.K(4), .COEF_W(8), .COEF(C1)) u1 (.addr(addr), .data(d1));
  rom_rtl #(.K(4), .COEF_W(8), .COEF(C2)) u2 (.addr(addr), .data(d2));

  function automatic int ref_sum(logic signed [7:0] c [4], logic [3:0] a);
    int s = 0;
    if (a[3]) s += c[0];
    if (a[2]) s += c[1];
    if (a[1]) s += c[2];
    if (a[0]) s += c[3];
    return s;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      addr = 4'(a);
      #1;
      checks += 2;
      if (int'(d1) != ref_sum(C1, addr)) begin
        failures++;
        $display("FAIL set1 addr=%b got %0d exp %0d", addr, d1, ref_sum(C1, addr));
      end
      if (int'(d2) != ref_sum(C2, addr)) begin
        failures++;
        $display("FAIL set2 addr=%b got %0d exp %0d", addr, d2, ref_sum(C2, addr));
      end
    end
    // Spot checks of the table's address-bit order.
    addr = 4'b1000; #1; checks++; if (d1 != 10'sd17)   begin failures++; $display("FAIL 1000"); end
    addr = 4'b0001; #1; checks++; if (d1 != -10'sd64)  begin failures++; $display("FAIL 0001"); end
    addr = 4'b1100; #1; checks++; if (d1 != 10'sd12)   begin failures++; $display("FAIL 1100"); end
    addr = 4'b1111; #1; checks++; if (d2 != -10'sd512) begin failures++; $display("FAIL 1111"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
