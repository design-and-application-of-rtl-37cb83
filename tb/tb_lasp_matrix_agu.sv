// tb_lasp_matrix_agu: checks every matrix addressing code of the LASP24
// matrix address generator against a reference built from (row, column)
// pairs, for random and corner-case auxiliary register values.
module tb_lasp_matrix_agu;
  logic [3:0] code;
  logic [7:0] ar0, ar1, addr;
  logic       valid;
  int checks = 0, failures = 0;

  lasp_matrix_agu dut (.code, .ar0, .ar1, .addr, .valid);

  // reference: row and column as integers, reduced modulo 16
  function automatic void ref_model(input int c, input int a0, input int a1,
                                    output int exp_addr, output bit exp_valid);
    int l0, l1, row, col;
    bit rc;
    l0 = a0 % 16; l1 = a1 % 16;
    exp_valid = 1;
    row = 0; col = 0; exp_addr = 0; rc = 1;
    case (c)
      0:  begin exp_addr = a0; rc = 0; end
      1:  begin exp_addr = a1; rc = 0; end
      2:  begin exp_addr = (a0 + a1) % 256; rc = 0; end
      3:  begin row = 15;          col = l0; end
      4:  begin row = l1 + 1;      col = l0; end
      5:  begin row = 14;          col = l0 - l1; end
      6:  begin row = 14;          col = l0 + 1; end
      7:  begin row = l0 + 1;      col = l0 + 1; end
      8:  begin row = l0 - l1;     col = l0; end
      9:  begin row = l1 + 1;      col = l0 + 1; end
      12: begin row = 0;           col = l0; end
      13: begin row = 14;          col = l0; end
      15: begin row = 1;           col = l0; end
      default: begin exp_valid = 0; rc = 0; end
    endcase
    if (rc) exp_addr = ((row + 16) % 16) * 16 + ((col + 16) % 16);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea; bit ev;
    for (int it = 0; it < 400; it++) begin
      for (int c = 0; c < 16; c++) begin
        code = 4'(c);
        if (it == 0)      begin ar0 = 8'h0F; ar1 = 8'h0F; end
        else if (it == 1) begin ar0 = 8'h00; ar1 = 8'h01; end
        else begin ar0 = 8'($urandom); ar1 = 8'($urandom); end
        #1;
        ref_model(c, ar0, ar1, ea, ev);
        checks++;
        if (valid !== ev || (ev && addr !== 8'(ea))) begin
          failures++;
          if (failures < 10)
            $display("code %b ar0 %h ar1 %h: got %h/%b want %h/%b", code, ar0, ar1, addr, valid, ea, ev);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
