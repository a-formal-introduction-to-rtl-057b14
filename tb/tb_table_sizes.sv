// tb_table_sizes: builds the ALU at each word size of the published ALU
// characteristics (1, 2, 4, 8, 16, 32, 64 and 128 bits) and the cost-selected
// adder at each size of the published adder cost comparison (1, 2, 4, 8, 16,
// 25, 26, 27, 32, 64 and 128 bits), and checks each one against integer
// arithmetic.
module tb_table_sizes;
  int checks = 0, failures = 0;
  logic start = 0;

  localparam int NA = 8;
  localparam int ALU_SIZES[NA] = '{1, 2, 4, 8, 16, 32, 64, 128};
  logic done[NA];
  int ch[NA], fl[NA], cy[NA], ov[NA], fc[NA];

  for (genvar i = 0; i < NA; i++) begin : g_alu
    alu_checker #(.N(ALU_SIZES[i]), .ROUNDS(100)) u (
      .start(start), .done(done[i]), .checks(ch[i]), .failures(fl[i]),
      .carries(cy[i]), .overflows(ov[i]), .full_chains(fc[i]));
  end

  localparam int ND = 11;
  localparam int ADD_SIZES[ND] = '{1, 2, 4, 8, 16, 25, 26, 27, 32, 64, 128};
  logic [127:0] a, b;
  logic         c;
  logic [127:0] sum[ND];
  logic         cout[ND];

  for (genvar i = 0; i < ND; i++) begin : g_add
    localparam int W = ADD_SIZES[i];
    adder #(.N(W)) u (.c(c), .a(a[W-1:0]), .b(b[W-1:0]), .sum(sum[i][W-1:0]), .cout(cout[i]));
    assign sum[i][127:W] = '0;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 start = 1;
    for (int r = 0; r < 1000; r++) begin
      a = {$urandom, $urandom, $urandom, $urandom};
      b = {$urandom, $urandom, $urandom, $urandom};
      c = 1'($urandom);
      if (r == 0) begin a = '1; b = '0; c = 1; end
      #1;
      for (int i = 0; i < ND; i++) begin
        logic [128:0] mask, e;
        mask = (129'd1 << ADD_SIZES[i]) - 1;
        e = (({1'b0, a} & mask) + ({1'b0, b} & mask) + 129'(c));
        checks++;
        if ({cout[i], sum[i]} !== {e[ADD_SIZES[i]], e[127:0] & mask[127:0]}) begin
          failures++;
          $display("FAIL adder N=%0d", ADD_SIZES[i]);
        end
      end
    end
    for (int i = 0; i < NA; i++) wait (done[i]);
    for (int i = 0; i < NA; i++) begin
      checks += ch[i] + 1;
      failures += fl[i];
      if (cy[i] == 0) begin failures++; $display("FAIL ALU N=%0d never carried", ALU_SIZES[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
