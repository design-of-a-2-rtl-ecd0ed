// tb_transpose_ram: random writes and reads of the 64 x 16 transpose
// memory against a model array. Read data must appear one cycle after the
// read address, a write must be visible to a read in the next cycle, and
// the read data must hold while no read is issued.
module tb_transpose_ram;
  logic clk = 1'b0;
  logic we, re;
  logic [5:0] waddr, raddr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [64];
  int checks = 0, failures = 0;

  transpose_ram dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                     .re(re), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    logic [15:0] exp_d;
    logic        exp_ok;
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill every word first
    for (int a = 0; a < 64; a++) begin
      we <= 1; waddr <= 6'(a); wdata <= 16'($urandom); model[a] = 'x;
      @(posedge clk);
      model[a] = wdata;
    end
    exp_ok = 0; exp_d = '0;
    for (int n = 0; n < 20000; n++) begin
      logic        w, r;
      logic [5:0]  wa, ra;
      logic [15:0] wd;
      w = 1'($urandom); r = 1'($urandom);
      wa = 6'($urandom); ra = (n % 4 == 0) ? wa : 6'($urandom); wd = 16'($urandom);
      we <= w; waddr <= wa; wdata <= wd; re <= r; raddr <= ra;
      @(posedge clk);
      #1;
      if (r) begin exp_d = model[ra]; exp_ok = 1; end  // read sees the old word
      if (w) model[wa] = wd;
      if (exp_ok) begin
        checks++;
        if (rdata != exp_d) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d: rdata %h expected %h", n, rdata, exp_d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (21000) @(posedge clk);
    failures++;
    $display("tb_transpose_ram: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
