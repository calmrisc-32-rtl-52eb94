// tb_cr32_regfile: self-checking test of the register file. Every physical
// register is written with a distinct value; then every logical register is
// read in user mode and in privileged mode with each register-set selection,
// and compared with the set the mapping rule names (user: sets 0/1;
// privileged: r0..r7 in set 0 or 2 by rs[0], r8..r15 in set 1 or 3 by rs[1]).
// Port S, addressed by physical number, is read for every register.
module tb_cr32_regfile;
  import cr32_pkg::*;
  logic clk = 0, rst_n = 0;
  sr_t sr;
  logic [3:0] ra, rb, rd;
  logic [4:0] ra_p, rb_p, rd_p, wa, rs_p = 0;
  logic [31:0] qa, qb, qs, wdata;
  logic we;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cr32_regfile dut (.clk, .rst_n, .sr, .ra, .rb, .rd, .ra_p, .rb_p, .rd_p,
                    .qa, .qb, .rs_p, .qs, .we, .wa, .wdata);

  function automatic int set_of(int lr, bit pm, logic [1:0] rs);
    if (!pm) return lr / 8;
    return (lr < 8) ? (rs[0] ? 2 : 0) : (rs[1] ? 3 : 1);
  endfunction

  initial begin
    sr = SR_RESET; we = 0; wa = 0; wdata = 0; ra = 0; rb = 0; rd = 0;
    repeat (2) @(posedge clk);
    #1 ra = 4'd5;
    #1 checks++; if (qa !== 0) failures++;          // reset to zero
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); we = 1; wa = 5'(i); wdata = 32'hA000_0000 + 32'(i * 7);
    end
    @(negedge clk); we = 0;
    for (int m = 0; m < 5; m++) begin
      sr.pm = (m != 0); sr.rs = 2'(m == 0 ? 0 : m - 1);
      for (int l = 0; l < 16; l++) begin
        int p;
        ra = 4'(l); rb = 4'(15 - l); rd = 4'(l);
        #1;
        p = set_of(l, sr.pm, sr.rs) * 8 + (l % 8);
        checks++;
        if (ra_p != 5'(p) || rd_p != 5'(p) || qa !== 32'hA000_0000 + 32'(p * 7)) begin
          failures++; $display("FAIL mode %0d r%0d: phys %0d value %h", m, l, ra_p, qa);
        end
        p = set_of(15 - l, sr.pm, sr.rs) * 8 + ((15 - l) % 8);
        checks++;
        if (rb_p != 5'(p) || qb !== 32'hA000_0000 + 32'(p * 7)) begin
          failures++; $display("FAIL port B mode %0d r%0d", m, 15 - l);
        end
      end
    end
    for (int p = 0; p < 32; p++) begin
      rs_p = 5'(31 - p);
      #1 checks++;
      if (qs !== 32'hA000_0000 + 32'((31 - p) * 7)) begin
        failures++; $display("FAIL port S register %0d: %h", 31 - p, qs);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
