// Testbench for operand_crossbar: random bank returns with distinct tags;
// every tagged port must get its bank's row and all other ports nothing.
`include "tb_check.svh"
module tb_operand_crossbar;
  int checks = 0, failures = 0;
  logic [1:0] bank_valid; logic [1:0][2:0] bank_tag; logic [1:0][1023:0] bank_data;
  logic [5:0] port_valid; logic [5:0][1023:0] port_data;
  operand_crossbar #(.NBANKS(2), .NPORTS(6), .WIDTH(1024)) dut (.bank_valid, .bank_tag, .bank_data, .port_valid, .port_data);
  initial begin
    #100000; failures++; $display("watchdog"); `TB_FINISH
  end
  initial begin
    for (int it = 0; it < 300; it++) begin
      bank_valid = 2'($urandom);
      bank_tag[0] = 3'($urandom % 6);
      bank_tag[1] = 3'((bank_tag[0] + 1 + $urandom % 5) % 6);
      for (int b = 0; b < 2; b++) for (int i = 0; i < 32; i++) bank_data[b][i*32 +: 32] = $urandom;
      #1;
      for (int p = 0; p < 6; p++) begin
        logic ev; logic [1023:0] ed;
        ev = 0; ed = '0;
        for (int b = 0; b < 2; b++) if (bank_valid[b] && bank_tag[b] == 3'(p)) begin ev = 1; ed = bank_data[b]; end
        `CHECK(port_valid[p] == ev, $sformatf("port %0d valid", p))
        if (ev) `CHECK(port_data[p] == ed, $sformatf("port %0d data", p))
      end
    end
    `TB_FINISH
  end
endmodule
