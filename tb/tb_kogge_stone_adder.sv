// Self-checking testbench for the Kogge-Stone adder.
//
// The default 16-bit adder is driven with corner cases (all-ones carry
// chains, alternating patterns) and random operands, with and without carry
// in; its {cout, s} must equal a + b + cin computed with the simulator's own
// arithmetic. A 5-bit instance (a width that is not a power of two) is
// checked exhaustively and a 32-bit instance with random operands, to
// exercise the prefix tree at other sizes.
module tb_kogge_stone_adder;

  localparam int unsigned RANDOM_VECTORS = 50000;

  logic [15:0] a16, b16, s16;
  logic        ci16, co16;
  logic [4:0]  a5, b5, s5;
  logic        ci5, co5;
  logic [31:0] a32, b32, s32;
  logic        ci32, co32;

  kogge_stone_adder              u16 (.a(a16), .b(b16), .cin(ci16), .s(s16), .cout(co16));
  kogge_stone_adder #(.W(5))     u5  (.a(a5),  .b(b5),  .cin(ci5),  .s(s5),  .cout(co5));
  kogge_stone_adder #(.W(32))    u32 (.a(a32), .b(b32), .cin(ci32), .s(s32), .cout(co32));

  int checks   = 0;
  int failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [16:0] want16;
    logic [5:0]  want5;
    logic [32:0] want32;
    a5 = '0; b5 = '0; ci5 = 1'b0;
    a32 = '0; b32 = '0; ci32 = 1'b0;

    for (int v = 0; v < RANDOM_VECTORS + 8; v++) begin
      case (v)
        0: begin a16 = 16'hffff; b16 = 16'h0000; ci16 = 1'b1; end
        1: begin a16 = 16'hffff; b16 = 16'hffff; ci16 = 1'b1; end
        2: begin a16 = 16'h0000; b16 = 16'h0000; ci16 = 1'b0; end
        3: begin a16 = 16'h5555; b16 = 16'haaaa; ci16 = 1'b1; end
        4: begin a16 = 16'h7fff; b16 = 16'h0001; ci16 = 1'b0; end
        5: begin a16 = 16'h8000; b16 = 16'h8000; ci16 = 1'b0; end
        6: begin a16 = 16'h00ff; b16 = 16'h0f01; ci16 = 1'b0; end
        7: begin a16 = 16'h0000; b16 = 16'h0000; ci16 = 1'b1; end
        default: begin a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom); end
      endcase
      #1;
      want16 = 17'(a16) + 17'(b16) + 17'(ci16);
      checks++;
      if ({co16, s16} !== want16) begin
        failures++;
        if (failures < 20)
          $display("FAIL W=16 a=%h b=%h cin=%b: got %h, want %h", a16, b16, ci16, {co16, s16}, want16);
      end
    end

    for (int v = 0; v < 2048; v++) begin
      {ci5, a5, b5} = 11'(v);
      #1;
      want5 = 6'(a5) + 6'(b5) + 6'(ci5);
      checks++;
      if ({co5, s5} !== want5) begin
        failures++;
        if (failures < 20)
          $display("FAIL W=5 a=%h b=%h cin=%b: got %h, want %h", a5, b5, ci5, {co5, s5}, want5);
      end
    end

    for (int v = 0; v < RANDOM_VECTORS; v++) begin
      a32 = $urandom; b32 = (v == 0) ? ~a32 : $urandom; ci32 = (v == 0) ? 1'b1 : 1'($urandom);
      #1;
      want32 = 33'(a32) + 33'(b32) + 33'(ci32);
      checks++;
      if ({co32, s32} !== want32) begin
        failures++;
        if (failures < 20)
          $display("FAIL W=32 a=%h b=%h cin=%b: got %h, want %h", a32, b32, ci32, {co32, s32}, want32);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
