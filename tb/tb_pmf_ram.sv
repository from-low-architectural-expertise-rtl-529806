// tb_pmf_ram: checks the cyclically partitioned pmf array: whole-pmf writes and reads on
// both ports, and that element x of row y is stored in bank x at address y (flat element
// index y*2^m + x lands in bank index mod 2^m).
module tb_pmf_ram;
  localparam int GF_M = 2, Q = 4, DEPTH = 8;
  logic clk = 1'b0;
  logic [1:0] en, we;
  logic [1:0][2:0] addr;
  logic [1:0][Q-1:0][7:0] wdata, rdata;
  int checks = 0, failures = 0;
  logic [Q-1:0][7:0] shadow [DEPTH];
  logic [7:0] flat [DEPTH * Q];

  pmf_ram #(.GF_M(GF_M), .DEPTH(DEPTH)) dut (.clk(clk), .en(en), .we(we), .addr(addr),
                                            .wdata(wdata), .rdata(rdata));
  always #5 clk = ~clk;

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    en = '0; we = '0; addr = '0; wdata = '0;
    for (int y = 0; y < DEPTH; y++) begin
      @(negedge clk);
      en = 2'b01; we = 2'b01; addr[0] = 3'(y);
      for (int x = 0; x < Q; x++) begin
        wdata[0][x] = 8'($urandom);
        flat[y * Q + x] = wdata[0][x];
      end
      shadow[y] = wdata[0];
    end
    @(negedge clk);
    en = '0; we = '0;
    // the banks hold the flat array partitioned cyclically
    for (int i = 0; i < DEPTH * Q; i++) begin
      case (i % Q)
        0: check(32'(dut.g_bank[0].u_bank.mem[i / Q]), 32'(flat[i]), "bank 0 content");
        1: check(32'(dut.g_bank[1].u_bank.mem[i / Q]), 32'(flat[i]), "bank 1 content");
        2: check(32'(dut.g_bank[2].u_bank.mem[i / Q]), 32'(flat[i]), "bank 2 content");
        default: check(32'(dut.g_bank[3].u_bank.mem[i / Q]), 32'(flat[i]), "bank 3 content");
      endcase
    end
    // two-port whole-pmf reads and writes
    for (int n = 0; n < 200; n++) begin
      logic [1:0][Q-1:0][7:0] exp;
      @(negedge clk);
      en = 2'b11;
      we[0] = 1'($urandom_range(1)); we[1] = 1'b0;
      addr[0] = 3'($urandom_range(DEPTH - 1));
      addr[1] = 3'($urandom_range(DEPTH - 1));
      wdata[0] = {$urandom};
      exp[0] = shadow[addr[0]];
      exp[1] = shadow[addr[1]];
      @(posedge clk); #1;
      check(rdata[0], exp[0], "port 0 pmf");
      check(rdata[1], exp[1], "port 1 pmf");
      if (we[0]) shadow[addr[0]] = wdata[0];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
