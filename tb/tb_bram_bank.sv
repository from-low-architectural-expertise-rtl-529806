// tb_bram_bank: checks the dual-port bank against a shadow array: writes on both ports,
// one-cycle read latency, read-first behaviour, and port 1 winning a write collision.
module tb_bram_bank;
  localparam int DEPTH = 16;
  logic clk = 1'b0;
  logic [1:0] en, we;
  logic [1:0][3:0] addr;
  logic [1:0][7:0] wdata, rdata;
  int checks = 0, failures = 0;
  logic [7:0] shadow [DEPTH];

  bram_bank #(.DEPTH(DEPTH), .W(8)) dut (.clk(clk), .en(en), .we(we), .addr(addr),
                                         .wdata(wdata), .rdata(rdata));
  always #5 clk = ~clk;

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    en = '0; we = '0; addr = '0; wdata = '0;
    // fill through alternating ports
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      en = 2'b00; we = 2'b00;
      en[i % 2] = 1'b1; we[i % 2] = 1'b1;
      addr[i % 2] = 4'(i); wdata[i % 2] = 8'(8'h30 + i * 7);
      shadow[i] = 8'(8'h30 + i * 7);
    end
    // random traffic
    for (int n = 0; n < 400; n++) begin
      logic [1:0][7:0] exp;
      @(negedge clk);
      for (int p = 0; p < 2; p++) begin
        en[p] = 1'b1; we[p] = 1'($urandom_range(1)); addr[p] = 4'($urandom_range(DEPTH - 1));
        wdata[p] = 8'($urandom);
      end
      exp[0] = shadow[addr[0]];
      exp[1] = shadow[addr[1]];
      @(posedge clk); #1;
      check(rdata[0], exp[0], "port 0 read-first");
      check(rdata[1], exp[1], "port 1 read-first");
      for (int p = 0; p < 2; p++) if (we[p]) shadow[addr[p]] = wdata[p];
    end
    // collision: port 1 wins
    @(negedge clk);
    en = 2'b11; we = 2'b11; addr[0] = 4'd5; addr[1] = 4'd5; wdata[0] = 8'h11; wdata[1] = 8'h22;
    @(negedge clk);
    en = 2'b01; we = 2'b00;
    @(negedge clk);
    check(rdata[0], 8'h22, "collision");
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
