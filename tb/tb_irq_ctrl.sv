// tb_irq_ctrl: self-checking test of the interrupt controller.
// Random source levels, masks and global enable are compared every cycle with
// a model: irq(t+1) = enable & |(src & mask); PENDING, RAW and PRIORITY reads
// are checked against the same model.
module tb_irq_ctrl;
  import hs_pkg::*;
  logic clk = 0, rst_n = 0;
  bus_req_t bus;
  logic [31:0] rdata;
  logic [NIRQ-1:0] src;
  logic irq;
  int checks = 0, failures = 0;
  logic [NIRQ-1:0] m_mask;
  logic m_gie;

  irq_ctrl dut (.*);
  always #5 clk = ~clk;
  `include "tb/tb_bus_util.svh"

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [31:0] prio(input logic [NIRQ-1:0] p);
    for (int k = 0; k < NIRQ; k++) if (p[k]) return k;
    return 32'h8000_0000;
  endfunction

  initial begin
    logic [31:0] d;
    bus = '0; src = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    m_mask = '1; m_gie = 1;
    for (int n = 0; n < 400; n++) begin
      src = NIRQ'($urandom);
      case ($urandom_range(0, 3))
        0: begin m_mask = NIRQ'($urandom); bus_write(8'h21, 32'(m_mask)); end
        1: begin m_gie = ($urandom_range(0, 3) != 0); bus_write(8'h23, 32'(m_gie)); end
        2: begin bus_read(8'h20, d); check(d == 32'(src & m_mask), "PENDING"); end
        default: begin bus_read(8'h24, d); check(d == prio(src & m_mask), "PRIORITY"); end
      endcase
      @(posedge clk); #1;
      check(irq == (m_gie && |(src & m_mask)), $sformatf("irq src=%b mask=%b gie=%b", src, m_mask, m_gie));
      bus_read(8'h22, d); check(d == 32'(src), "RAW");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
