// tb_pnp_avalon_in_header: exhaustive check of the address decode of the
// input header for every word address with and without chipselect, write
// and read: exactly the addressed existing register gets reg_we, offsets
// and data pass to the registers, and the read strobe and register number
// go to the output header.
`timescale 1ns/1ps
module tb_pnp_avalon_in_header;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [5:0]  avs_address;
  logic        avs_chipselect, avs_write, avs_read;
  logic [31:0] avs_writedata, wr_data;
  logic [2:0]  reg_we;
  logic [3:0]  wr_ofs, rd_ofs;
  logic [1:0]  rd_reg;
  logic        rd_valid;
  logic [2:0]  exp_we;

  pnp_avalon_in_header dut (.avs_address, .avs_chipselect, .avs_write, .avs_read,
                            .avs_writedata, .reg_we, .wr_ofs, .wr_data, .rd_ofs,
                            .rd_reg, .rd_valid);

  initial begin
    for (int a = 0; a < 64; a++)
      for (int m = 0; m < 8; m++) begin
        avs_address = 6'(a); avs_chipselect = m[0]; avs_write = m[1]; avs_read = m[2];
        avs_writedata = $urandom;
        #1;
        exp_we = '0;
        if (m[0] && m[1] && (a / 16) < 3) exp_we[a / 16] = 1'b1;
        check(reg_we == exp_we, "write enable decode");
        check(wr_ofs == 4'(a % 16) && rd_ofs == 4'(a % 16), "location offset");
        check(wr_data == avs_writedata, "write data");
        check(rd_reg == 2'(a / 16), "register select");
        check(rd_valid == (m[0] && m[2]), "read strobe");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
