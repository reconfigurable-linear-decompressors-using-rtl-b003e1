// tb_xor_network: self-checking testbench for xor_network at its default
// size (32 inputs, 1024 outputs, seven taps per output).
//
// The testbench rebuilds the connection matrix from the generator formula on
// its own (see rdc_pkg for the formula), checks that every row has exactly
// TAPS ones, then applies single-hot inputs (each output must equal the
// matrix entry, which reads the matrix column by column) and random inputs
// (each output must equal the parity of the input masked by its row).
module tb_xor_network;
  localparam int B = 32;
  localparam int N = 1024;
  localparam int T = 7;

  logic [B-1:0] x;
  logic [N-1:0] o;
  logic [B-1:0] row [N];
  int checks = 0, failures = 0;

  xor_network dut (.x(x), .o(o));

  // Independent rebuild of the connection rows.
  function automatic logic [B-1:0] ref_row(int j);
    logic [B-1:0] r = '0;
    logic [31:0]  s = j * 32'd2654435761 + 32'd1;
    int n = 0;
    while (n < T) begin
      int unsigned k;
      s = s * 32'd1664525 + 32'd1013904223;
      k = int'(s[31:16]) % B;
      if (r[k] == 1'b0) begin r[k] = 1'b1; n++; end
    end
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < N; j++) begin
      row[j] = ref_row(j);
      checks++;
      if ($countones(row[j]) != T) failures++;
    end
    // Column by column: one-hot inputs.
    for (int i = 0; i < B; i++) begin
      x = '0; x[i] = 1'b1;
      #1;
      for (int j = 0; j < N; j++) begin
        checks++;
        if (o[j] !== row[j][i]) begin
          failures++;
          if (failures < 10) $display("one-hot x[%0d]: out %0d = %b, expected %b", i, j, o[j], row[j][i]);
        end
      end
    end
    // Random inputs.
    for (int v = 0; v < 300; v++) begin
      x = $urandom;
      #1;
      for (int j = 0; j < N; j++) begin
        checks++;
        if (o[j] !== ^(x & row[j])) begin
          failures++;
          if (failures < 10) $display("random: out %0d wrong", j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
