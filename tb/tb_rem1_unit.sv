// tb_rem1_unit: checks the size-1 region error mask. Each output bit must be
// set exactly when that bit is set in at least one of the router, local,
// north and east masks; single-fault cases check each input alone.
module tb_rem1_unit;
  localparam int FW = 64;
  logic [FW-1:0] er, el, en, ee, rem;
  int checks = 0, failures = 0;

  rem1_unit #(.FLIT_W(FW)) dut (.em_router(er), .em_local(el), .em_north(en),
                                .em_east(ee), .rem(rem));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      logic [FW-1:0] exp;
      er = '0; el = '0; en = '0; ee = '0;
      if (t < 256) begin
        // one fault on one element
        case (t % 4)
          0: er[t/4] = 1'b1;
          1: el[t/4] = 1'b1;
          2: en[t/4] = 1'b1;
          default: ee[t/4] = 1'b1;
        endcase
      end else begin
        er = {$urandom, $urandom} & {$urandom, $urandom};
        el = {$urandom, $urandom} & {$urandom, $urandom};
        en = {$urandom, $urandom} & {$urandom, $urandom};
        ee = {$urandom, $urandom} & {$urandom, $urandom};
      end
      #1;
      for (int b = 0; b < FW; b++) exp[b] = (er[b] + el[b] + en[b] + ee[b]) != 0;
      checks++;
      if (rem !== exp) begin
        failures++;
        $display("FAIL case %0d: rem %h expected %h", t, rem, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
