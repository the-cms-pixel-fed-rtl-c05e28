`timescale 1ns/1ps
// tb_vme_slave: self-checking test of the VME slave and its local bus.
// A VME master model performs writes and reads to a 64-word register file
// behind the local bus, with noise spikes on the strobes before each cycle.
// Writes must reach the register file once, reads must return its contents
// with DTACK, DTACK must drop only after both strobes are low and rise after
// they are released, and cycles to another board address must be ignored.
module tb_vme_slave;
  logic clk = 0, rst_n = 0;
  logic [1:0] vme_ds_n = 2'b11;
  logic vme_write_n = 1;
  logic [23:0] vme_addr = '0;
  logic [31:0] vme_data_in = '0, vme_data_out, lb_wdata, lb_rdata;
  logic vme_data_oe, vme_dtack_n, lb_we, lb_re;
  logic [15:0] lb_addr;
  int checks = 0, failures = 0;
  logic [31:0] regs[64], model[64];
  int n_we = 0, n_re = 0;

  vme_slave #(.BOARD_ADDR(6'h04), .STABLE(3)) dut (.*);

  always #12.5 clk = ~clk;
  initial begin
    #5000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  assign lb_rdata = regs[lb_addr[5:0]];
  always @(posedge clk) begin
    if (rst_n && lb_we) begin regs[lb_addr[5:0]] <= lb_wdata; n_we++; end
    if (rst_n && lb_re) n_re++;
  end

  task automatic vme_cycle(bit wr, logic [23:0] a, logic [31:0] wd, output logic [31:0] rd, output bit acked);
    int t;
    // spike on one strobe
    @(negedge clk); vme_ds_n = 2'b10;
    @(negedge clk); vme_ds_n = 2'b11;
    repeat (2) @(negedge clk);
    vme_addr = a; vme_write_n = !wr; vme_data_in = wd;
    repeat (2) @(negedge clk);
    vme_ds_n = 2'b00;
    acked = 0;
    for (t = 0; t < 40; t++) begin
      @(negedge clk);
      if (!vme_dtack_n) begin acked = 1; break; end
    end
    rd = vme_data_out;
    if (acked) chk(!wr == vme_data_oe, "data driven only on reads");
    vme_ds_n = 2'b11;
    if (acked) begin
      for (t = 0; t < 40 && !vme_dtack_n; t++) @(negedge clk);
      chk(vme_dtack_n, "dtack released");
    end
    repeat (8) @(negedge clk);
  endtask

  initial begin
    logic [31:0] rd;
    bit acked;
    int we0;
    foreach (regs[i]) begin regs[i] = 32'(i); model[i] = 32'(i); end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 60; i++) begin
      automatic int r = $urandom_range(0, 63);
      if ($urandom_range(0, 1) != 0) begin
        automatic logic [31:0] v = $urandom;
        we0 = n_we;
        vme_cycle(1, {6'h04, 10'd0, 6'(r), 2'b00}, v, rd, acked);
        model[r] = v;
        chk(acked && n_we == we0 + 1, "write acknowledged once");
      end else begin
        vme_cycle(0, {6'h04, 10'd0, 6'(r), 2'b00}, 0, rd, acked);
        chk(acked && rd == model[r], $sformatf("read %0d: %h expected %h", r, rd, model[r]));
      end
    end
    we0 = n_we;
    vme_cycle(1, {6'h05, 18'd0}, 32'hdead, rd, acked);
    chk(!acked && n_we == we0, "other board address ignored");
    foreach (regs[i]) chk(regs[i] == model[i], "register file");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
