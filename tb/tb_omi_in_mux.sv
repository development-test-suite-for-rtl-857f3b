// tb_omi_in_mux: checks the input multiplexer. Sources are filled with
// random bytes; for every port address 0..255 the byte read one clock
// later is compared with the source the port map assigns to it (unused
// addresses must read zero).
module tb_omi_in_mux;
  import omi_pkg::*;
  logic clk = 0;
  byte_t pid = 0, q;
  in_sources_t src;
  int checks = 0, failures = 0;

  omi_in_mux dut (.clk, .port_id(pid), .src, .in_port(q));

  always #5 clk = ~clk;

  function automatic byte_t expect_byte(int p);
    case (p)
      0:  return {4'h0, src.buttons};
      1:  return src.uart_rx_data;
      2:  return src.uart_status;
      3:  return src.spi_rx;
      4:  return {7'h0, src.spi_busy};
      5:  return src.data_rom;
      6:  return src.vector[31:24];
      7:  return src.vector[23:16];
      8:  return src.vector[15:8];
      9:  return src.vector[7:0];
      10: return {4'h0, src.vector[35:32]};
      11: return src.tb_in[31:24];
      12: return src.tb_in[23:16];
      13: return src.tb_in[15:8];
      14: return src.tb_in[7:0];
      15: return {7'h0, src.ir_rx};
      16, 17, 18, 19, 20, 21, 22, 23: return byte_t'(src.uio_in >> (8 * (p - 16)));
      24: return {6'h0, src.ps2_in};
      25: return src.sd_dq_in[7:0];
      26: return src.sd_dq_in[15:8];
      default: return 8'h00;
    endcase
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int round = 0; round < 8; round++) begin
      src = in_sources_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      for (int p = 0; p < 256; p++) begin
        pid = byte_t'(p);
        @(posedge clk); #1;
        checks++;
        if (q !== expect_byte(p)) begin
          failures++; $display("port %0d got %h exp %h", p, q, expect_byte(p));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
