// chip_select_tb: every combination of A14..A11, A0, BHE and the I/O states,
// compared with the memory map written as address ranges.
module chip_select_tb;
  import ferro_pkg::*;
  logic [14:11] addr_hi;
  logic a0, bhe_n, st_i, st_o, rdy1;
  cs_t cs_n;
  int checks = 0, failures = 0;

  chip_select dut (.addr_hi(addr_hi), .a0(a0), .bhe_n(bhe_n), .st_i(st_i), .st_o(st_o),
                   .cs_n(cs_n), .rdy1(rdy1));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int unsigned a;
      bit ferro, ram1, ram2, rom;
      {addr_hi, a0, bhe_n, st_i, st_o} = 8'(v);
      // a byte address inside the block, low bits random
      a = {17'b0, addr_hi, 11'b0} | ($urandom & 32'h7FE) | {31'b0, a0};
      #10;
      ferro = (a >= 32'h1000) && (a < 32'h2000);
      ram1  = (a >= 32'h2000) && (a < 32'h2800);
      ram2  = (a >= 32'h2800) && (a < 32'h3000);
      rom   = (a >= 32'h3000);
      check(cs_n.ferro_n   == !ferro,           $sformatf("FERRO at %h", a));
      check(cs_n.lowram1_n == !(ram1 && !a0),   $sformatf("LOWRAM1 at %h", a));
      check(cs_n.lowram2_n == !(ram2 && !a0),   $sformatf("LOWRAM2 at %h", a));
      check(cs_n.hiram1_n  == !(ram1 && !bhe_n), $sformatf("HIRAM1 at %h", a));
      check(cs_n.hiram2_n  == !(ram2 && !bhe_n), $sformatf("HIRAM2 at %h", a));
      check(cs_n.romcs_n   == !rom,             $sformatf("ROMCS at %h", a));
      check(rdy1 == (!ferro || st_i || st_o),   $sformatf("RDY1 at %h", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
