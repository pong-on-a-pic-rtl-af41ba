// tb_data_read: self-checking test of the bus decoder and shape registers.
// Checks the reset values, then writes every register through the bus
// (code and value together, as the sender leaves them), checks that a word
// takes SYNC_STAGES+1 = 3 clock edges to arrive, that CODE_NONE and codes not
// in the map change nothing, and a stream of random words against a model.
module tb_data_read;
  import pong_pkg::*;

  logic      clk = 0, rst = 1;
  bus_word_t bus;
  shapes_t   shapes, model;
  int checks = 0, failures = 0;

  data_read dut (.clk(clk), .rst(rst), .bus(bus), .shapes(shapes));

  always #5 clk = !clk;

  task automatic expect_shapes(string what);
    checks++;
    if (shapes !== model) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, shapes, model);
    end
  endtask

  // The model: a word with code c writes field c of the register set.
  function automatic shapes_t apply(shapes_t s, logic [5:0] c, coord_t v);
    case (c)
      6'b111000: s.paddle1x = v;
      6'b111001: s.paddle2x = v;
      6'b110000: s.paddle1y = v;
      6'b110001: s.paddle2y = v;
      6'b101000: s.ballx = v;
      6'b101001: s.bally = v;
      6'b110010: s.paddle_width = v;
      6'b110011: s.paddle_height = v;
      6'b101010: s.ball_width = v;
      6'b101011: s.ball_height = v;
      6'b100100: s.score = v;
      default: ;
    endcase
    return s;
  endfunction

  task automatic put(logic [5:0] c, coord_t v, int hold);
    @(negedge clk) bus = {c, v};
    repeat (hold) @(negedge clk);
    model = apply(model, c, v);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [5:0] CODES [11] = '{6'b111000, 6'b111001, 6'b110000, 6'b110001,
      6'b101000, 6'b101001, 6'b110010, 6'b110011, 6'b101010, 6'b101011, 6'b100100};

  initial begin
    bus = '0;
    #12 rst = 0;
    model = '{paddle1x: 0, paddle2x: 635, paddle1y: 0, paddle2y: 0, ballx: 320,
              bally: 240, paddle_width: 5, paddle_height: 100, ball_width: 5,
              ball_height: 10, score: 0};
    @(negedge clk);
    expect_shapes("reset values");
    // Latency: the word is visible after exactly three rising edges.
    @(negedge clk) bus = {6'b101000, 10'd77};
    repeat (2) @(negedge clk);
    expect_shapes("ballx not yet written after 2 edges");
    @(negedge clk);
    model.ballx = 77;
    expect_shapes("ballx written after 3 edges");
    // Every register.
    foreach (CODES[i]) begin
      put(CODES[i], coord_t'(100 + 37 * i), 4);
      expect_shapes($sformatf("code %b", CODES[i]));
    end
    // The sender's three-step protocol: NONE, low byte, then code with upper bits.
    put(6'b000000, 10'h0ab, 4); expect_shapes("NONE with data");
    put(6'b110001, 10'h2ab, 4); expect_shapes("paddle2y via protocol");
    // Codes outside the map.
    put(6'b011000, 10'h155, 4); expect_shapes("unmapped code 011000");
    put(6'b111111, 10'h155, 4); expect_shapes("unmapped code 111111");
    // Random stream, one clock per word, checked against the model three words back.
    begin
      shapes_t hist [4];
      for (int k = 0; k < 4; k++) hist[k] = model;
      for (int n = 0; n < 2000; n++) begin
        logic [5:0] c;
        coord_t v;
        c = ($urandom_range(0, 3) == 0) ? 6'($urandom) : CODES[$urandom_range(0, 10)];
        v = 10'($urandom);
        @(negedge clk);
        checks++;
        if (shapes !== hist[2]) begin
          failures++;
          if (failures < 10) $display("FAIL random %0d", n);
        end
        bus = {c, v};
        model = apply(model, c, v);
        for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = model;
      end
    end
    // Asynchronous reset brings the reset values back.
    @(negedge clk) rst = 1;
    #1;
    model = '{paddle1x: 0, paddle2x: 635, paddle1y: 0, paddle2y: 0, ballx: 320,
              bally: 240, paddle_width: 5, paddle_height: 100, ball_width: 5,
              ball_height: 10, score: 0};
    expect_shapes("asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
