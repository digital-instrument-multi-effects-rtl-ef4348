// tb_avalon_mm_decoder: sweeps every even byte address from 0 to 0x2fff and
// checks, against the register map written out independently here, which chip
// select is high (exactly one inside a window, none outside) and the word
// address within the window.
module tb_avalon_mm_decoder;
  logic [13:0] address;
  logic cs_lim, cs_dly, cs_biq, cs_fir, cs_vga;
  logic [8:0] word_addr;
  int checks = 0, failures = 0;
  int hits[5];

  avalon_mm_decoder dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 14'h3000; a += 2) begin
      logic [4:0] exp_cs;
      int base;
      address = 14'(a);
      exp_cs = '0; base = 0;
      if (a >= 'h10 && a <= 'h1f)     begin exp_cs[0] = 1; base = 'h10;   end
      if (a >= 'h20 && a <= 'h2f)     begin exp_cs[1] = 1; base = 'h20;   end
      if (a >= 'h100 && a <= 'h13f)   begin exp_cs[2] = 1; base = 'h100;  end
      if (a >= 'h1000 && a <= 'h13ff) begin exp_cs[3] = 1; base = 'h1000; end
      if (a >= 'h2000 && a <= 'h200f) begin exp_cs[4] = 1; base = 'h2000; end
      #1;
      checks++;
      if ({cs_vga, cs_fir, cs_biq, cs_dly, cs_lim} !== exp_cs) begin
        failures++; $display("FAIL select at %h", a);
      end
      if (exp_cs != 0) begin
        checks++;
        if (word_addr !== 9'((a - base) / 2)) begin failures++; $display("FAIL word address at %h", a); end
        for (int i = 0; i < 5; i++) if (exp_cs[i]) hits[i]++;
      end
    end
    // window sizes in 16-bit registers
    checks++;
    if (hits[0] != 8 || hits[1] != 8 || hits[2] != 32 || hits[3] != 512 || hits[4] != 8) begin
      failures++; $display("FAIL window sizes %p", hits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
