// config_unit: the on-chip boot FSM that loads the serial configuration
// chain.
//
// All configuration state of the chip (nanostores, static EXU settings,
// scan registers) forms one shift register; a bit moves one place on each
// clock with `cfg_en` high. In master mode the FSM boots the chip (and any
// chips daisy-chained after it) from a byte-wide EPROM after reset: bytes
// 0 and 1 hold the number N of payload bytes (high byte first), bytes 2 ..
// N+1 the payload, each shifted in most significant bit first. Each byte
// takes one address cycle, one data cycle (rom_data is sampled one full
// cycle after rom_addr changes) and eight shift cycles. In slave mode the
// chain is driven from the upstream chip's scan path (up_en, up_sd).
// `down_en` lets the downstream chip shift in step; its data is the end of
// this chip's chain.
//
// From the document: one serial configuration chain, an on-board FSM, boot
// from standard EPROMs, chips chained on one scan path. This design's own:
// the length header, the byte timing, clock enables instead of a generated
// configuration clock, and master/slave selection by a pin.
module config_unit #(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          master,
  output logic [AW-1:0] rom_addr,
  input  logic [7:0]    rom_data,
  input  logic          up_en,
  input  logic          up_sd,
  output logic          cfg_en,
  output logic          cfg_sd,
  output logic          down_en,
  output logic          busy,
  output logic          done
);
  typedef enum logic [2:0] {S_ADDR, S_DATA, S_SHIFT, S_DONE, S_SLAVE} state_e;

  state_e       state;
  logic [1:0]   hdr_left;
  logic [7:0]   len_hi;
  logic [15:0]  bytes_left;
  logic [7:0]   sh;
  logic [2:0]   bit_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_ADDR;
      rom_addr   <= '0;
      hdr_left   <= 2'd2;
      len_hi     <= '0;
      bytes_left <= '0;
      sh         <= '0;
      bit_cnt    <= '0;
    end else begin
      case (state)
        S_ADDR:  state <= master ? S_DATA : S_SLAVE;
        S_DATA: begin
          rom_addr <= rom_addr + 1'b1;
          if (hdr_left != 0) begin
            hdr_left <= hdr_left - 1'b1;
            if (hdr_left == 2'd2) begin
              len_hi <= rom_data;
              state     <= S_ADDR;
            end else begin
              bytes_left <= {len_hi, rom_data};
              state      <= ({len_hi, rom_data} == 16'd0) ? S_DONE : S_ADDR;
            end
          end else begin
            sh         <= rom_data;
            bit_cnt    <= 3'd7;
            bytes_left <= bytes_left - 1'b1;
            state      <= S_SHIFT;
          end
        end
        S_SHIFT: begin
          sh      <= {sh[6:0], 1'b0};
          bit_cnt <= bit_cnt - 1'b1;
          if (bit_cnt == 3'd0) state <= (bytes_left == 16'd0) ? S_DONE : S_ADDR;
        end
        S_SLAVE: if (master) state <= S_ADDR;
        default: state <= S_DONE;
      endcase
    end
  end

  assign cfg_en  = (state == S_SLAVE) ? up_en : (state == S_SHIFT);
  assign cfg_sd  = (state == S_SLAVE) ? up_sd : sh[7];
  assign down_en = cfg_en;
  assign busy    = (state == S_SLAVE) ? up_en : (state != S_DONE);
  assign done    = (state == S_DONE);
endmodule
