// tb_nbldpc_fields: the larger fields of the evaluation, GF(8) and GF(16), on the same
// N = 384, d_v = 2, d_c = 3 code with 10 iterations. Two systems run side by side, each
// in a tb_nbldpc_field_run instance: GF(8) with 2 cores and GF(16) with 1 core (the full
// replication counts, 6 and 3, only repeat identical cores and are left out to keep the
// simulation short). Each run checks every decoded symbol and the decoding time of its
// first core; this module adds up the counts and ends with the result line. A watchdog
// ends the run if either system hangs.
module tb_nbldpc_fields;
  logic fin8, fin16;
  int checks8, failures8, checks16, failures16;

  tb_nbldpc_field_run #(.GF_M(3), .K(2)) u_gf8 (
    .finished(fin8), .checks(checks8), .failures(failures8));
  tb_nbldpc_field_run #(.GF_M(4), .K(1)) u_gf16 (
    .finished(fin16), .checks(checks16), .failures(failures16));

  initial begin
    int guard;
    guard = 0;
    #1;
    while (!(fin8 && fin16) && guard < 1000000) begin
      #10;
      guard++;
    end
    if (!(fin8 && fin16)) begin
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks8 + checks16, failures8 + failures16 + 1);
    end else begin
      $display("TB_RESULT checks=%0d failures=%0d", checks8 + checks16, failures8 + failures16);
    end
    $finish;
  end
endmodule
