`timescale 1ps/10fs
// tb_io_bank: words written through the write port on wclk are read back
// through the independent read port; unwritten cycles (we low) change
// nothing; the read port follows raddr without a clock.
module tb_io_bank;
  localparam int unsigned W = 8, D = 16;
  logic wclk = 1'b0, we;
  logic [3:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  io_bank #(.WIDTH(W), .DEPTH(D)) dut (.wclk(wclk), .we(we), .waddr(waddr), .wdata(wdata),
                                       .raddr(raddr), .rdata(rdata));

  always #5000 wclk = ~wclk;   // slow external write clock

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    for (int a = 0; a < D; a++) begin
      @(negedge wclk);
      we = 1'b1; waddr = 4'(a); wdata = W'($urandom); model[a] = wdata;
    end
    for (int i = 0; i < 600; i++) begin
      @(negedge wclk);
      we = 1'($urandom);
      waddr = 4'($urandom);
      wdata = W'($urandom);
      if (we) model[waddr] = wdata;
      raddr = 4'($urandom);
      #10;
      checks++;
      if (rdata !== model[raddr] && !(we && waddr == raddr)) begin
        failures++;
        $display("FAIL read %0d: %h expected %h", raddr, rdata, model[raddr]);
      end
    end
    @(negedge wclk); we = 1'b0;
    for (int a = 0; a < D; a++) begin
      raddr = 4'(a);
      #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL final read %0d: %h expected %h", a, rdata, model[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
