# BB84 quantum key distribution: FPGA control logic for Alice and Bob

BB84 lets two parties, Alice and Bob, grow a shared secret key from single
photons. Alice sends each photon in one of four polarisations: horizontal or
vertical in the rectilinear basis, and +45° or −45° in the diagonal basis. The
basis is random and the bit (0 or 1) is random. Bob measures each photon in a
basis he picks at random. Afterwards they talk over an ordinary public channel.
Bob reports which slots he saw a photon in and which bases he used. Alice tells
him which of those slots used the same basis as hers. Both keep the bits of
those slots; this is the *sifted key*. Part of the sifted key is then disclosed
to estimate the error rate. Above 11 % errors an eavesdropper (or a bad link)
cannot be ruled out, and the key is abandoned.

This RTL is the digital side of such a link. Alice's FPGA generates the random
data, drives four laser diodes, sifts and judges the key. Bob's FPGA drives the
analyser basis, records detector clicks and answers over the classical channel.
The optics (lasers, fibre, analyser, single-photon detectors) are outside the
RTL and reach it through ports.

## A round, step by step

Alice runs an eight-state Moore machine (`alice_top`). Bob runs a matching
controller (`bob_ctrl`).

| Alice state   | what happens                                                                 | Bob                                     |
|---------------|------------------------------------------------------------------------------|-----------------------------------------|
| `Idle`        | waits for a rising edge on `start`                                           | bases already drawn, waits for START     |
| `Encode`      | sends START; once it is on the line, `random_data` draws 15 (bit, basis) pairs | arms `bob_measure` on START              |
| `Q_trans`     | per slot: read the pair, encode it to one of four lasers, fire one slot      | per slot: set basis, collect clicks     |
| `P_rec1`      | waits for Bob's DET (detected slots) and BASES messages                      | sends DET, then BASES                    |
| `Compare`     | `sifter` keeps slots that were detected *and* measured in Alice's basis       | waits                                   |
| `P_trans`     | sends MATCH, the mask of kept slots                                          | sifts his own bits with MATCH            |
| `P_rec2`      | waits for CAL, Bob's first two sifted bits                                    | sends CAL, streams his key               |
| `Misestimate` | `err_est` compares CAL with her first two sifted bits; abandons or streams the key | —                                  |

Both sides drop the two disclosed bits. What is left of the sifted key is the
output key. Alice streams it on `final_key` with `ldkey` high, one bit per clock.
`key_done` then rises. If the key was abandoned, `key_done` and `key_abort` rise
together and nothing is streamed. Bob streams his copy the same way. Bob is never
told about an abort, so his stream is only valid when Alice's `key_abort` is low.

Alice latches Bob's messages by type in every state. A message that arrives
early is therefore not lost, and DET and BASES may come in either order. Bob
draws his random bases *before* START arrives. This way he is armed well before
Alice's first laser slot.

## Sifting and error estimation

This is the part that decides what the key is, so its rules are spelled out here.

**Sifting (`sifter`).** It walks the slots one per clock. For slot `i`:

    if valid[i] and alice_alphabet[i] == bob_alphabet[i]:
        orig_key[num] = ini_key[i];  match[i] = 1;  addr = i;  num = num + 1

* At Alice, `valid` is Bob's DET mask and `bob_alphabet` is Bob's BASES.
* Bob reuses the same module. He feeds it `valid = MATCH`, his own bases on both
  basis inputs, and his measured bits as `ini_key`.

Sifting takes N_SLOTS clocks. `done` pulses one clock later.

Reference case, written slot 0 first:

* Alice's bases `010010111001001`
* Bob's bases `011011010111000`
* key `000111101011001`
* every slot detected

These sift to the 8 bits `00110100` (`num` = 8), and the last kept slot is 13.
`tb_sifter` checks exactly this case.

**Error estimation (`err_est`).** It compares the first `min(num, CAL_BITS)`
sifted bits with Bob's calibration bits, one per clock, and counts the
differences in `err_cnt`. The key is abandoned when
`err_cnt * 100 > ERR_THRESH_PCT * compared`. With two calibration bits, any
error at all exceeds 11 %. If no bits were sifted, nothing is compared and an
empty key is accepted. Otherwise `orig_key[CAL_BITS .. num-1]` is streamed out.
For the reference key with calibration bits `00`, the output is `110100`.

Vectors use `[N-1:0]` with bit `i` = slot `i`, so a string written slot 0 first
reads reversed as a SystemVerilog literal. The sifted key is packed from bit 0
upward.

## Polarisation encoding

`pol_encoder` maps (bit, basis) to a one-hot laser select through two small RAMs:

* **RAM0** holds the code used to send a 0.
* **RAM1** holds the code used to send a 1.

Each RAM is addressed by the basis (0 rectilinear, 1 diagonal). Code bits are
H, V, +45, −45 (bits 0 to 3, see `bb84_pkg`). After reset RAM0 = {H, +45} and
RAM1 = {V, −45}. The `cfg_*` port rewrites any entry, for example to match a
realigned optical bench. The read is registered, like a block RAM.

## Slot timing and the optical ports

`laser_driver` runs one slot per `fire`, lasting `SLOT_CYCLES` clocks:

* `sync` is high in the first clock of the slot.
* The selected laser is on for `PULSE_CYCLES` clocks, starting `PULSE_OFFSET`
  clocks into the slot.
* `slot_done` marks the last clock of the slot.

Alice's controller spends two more clocks per slot on the RAM read and the fire,
so slots repeat every `SLOT_CYCLES + 2` clocks (10 at the defaults).

The `sync` pulse is carried to Bob (`bob_sync`), like the clock or sync pulse
that real QKD links send alongside the photons. Each sync opens a detection window of
`WINDOW_CYCLES + 1` clocks in `bob_measure`. At the top level `WINDOW_CYCLES` is
set to `SLOT_CYCLES − 2`. Exactly one click in the window is a detection, and
the bit is the detector that clicked (`det[1]` means 1). No click means a lost
photon. Two clicks are discarded. `basis_sel` drives Bob's analyser and shows the
basis of the current slot throughout it.

## Classical channel

`rt_interface` sends and receives typed messages. Each message is a type byte
and 16 data bits (`bb84_pkg::msg_t`). It goes out as three 8N1 UART bytes,
LSB first: type, data[7:0], data[15:8]. One message takes 30 bit times.

* Types: START, DET, BASES, MATCH, CAL.
* On transmit, a message is taken on `tx_valid && tx_ready`. An assertion checks
  that the message is held stable until it is taken.
* On receive, `rx_valid` pulses with the whole message.
* A byte with a bad stop bit drops the partial message. So does a gap of more
  than 32 bit times between bytes.

The data field is 16 bits, so one message carries at most 16 slots. An
elaboration-time assertion enforces `N_SLOTS <= 16`.

## Parameters

| parameter        | default | meaning                                   | origin |
|------------------|---------|-------------------------------------------|--------|
| `N_SLOTS`        | 15      | photon slots per round                    | reference simulation (15-slot sequences, 4-bit count) |
| `CAL_BITS`       | 2       | sifted bits disclosed to estimate errors  | reference simulation (2-bit calibration sequence) |
| `ERR_THRESH_PCT` | 11      | abandon threshold, percent                | BB84 11 % rule |
| `SLOT_CYCLES`    | 8       | clocks per laser slot                     | chosen |
| `PULSE_CYCLES`, `PULSE_OFFSET` | 1, 2 | laser pulse width and position in the slot | chosen |
| `WINDOW_CYCLES`  | 6       | Bob's detection window (at top: `SLOT_CYCLES−2`) | chosen |
| `CLKS_PER_BIT`   | 16      | UART clocks per bit                       | chosen; at 50 MHz and 115200 baud use 434 |
| `SEED`           | ACE1 (Alice), 5A3C (Bob) | LFSR seeds              | chosen |

At the defaults a whole round takes about 2,600 clocks. Most of that is the
five classical messages.

## Where this departs from, or adds to, the reference scheme

The original scheme gives the eight-state top machine, the module list, the
two-RAM encoding, the slot-serial sifting rule and the 11 % rule. Everything
below is this implementation's own choice:

* **Random numbers.** They come from a 16-bit LFSR (x^16+x^14+x^13+x^11+1),
  advanced two steps per slot. This is *not* cryptographically secure. A real
  link needs a true random source in `random_data`.
* **Classical link.** The message set and the UART framing are new. Only the
  role of the interface is given.
* **Calibration sequence.** Disclosing the first `CAL_BITS` sifted bits and
  dropping them from the key is a reading of the reference simulation, where
  two bits of Bob's key are compared against Alice's.
* **Detected slots.** Alice's sifting also uses Bob's detected-slot mask, as
  the protocol requires. The reference sifting rule compares bases only.
* **Optics on Bob's side.** Two detectors behind a basis-switched analyser,
  with double clicks discarded.
* **Bob's messages.** Bob's side is written only from the protocol steps: its
  message order and content are this design's.
* **Clocking and reset.** All logic is synchronous to one clock. Reset is
  active-low and asynchronous. `start` is synchronised with two flip-flops.

Not implemented:

* **Error correction.** Alice's circuit list includes an error-correcting
  module, but no algorithm or interface is given for it.
* **Privacy amplification.** It is mentioned as a later protocol step only.

Both would sit after `err_est` on the key stream.

## Files

* `rtl/bb84_pkg.sv`: shared message type, state enums, laser codes, LFSR step
* `rtl/bb84_qkd.sv`: top; Alice and Bob side by side, all channel signals as ports
* `rtl/alice_top.sv`: Alice's eight-state controller
* Alice's blocks:
  * `rtl/random_data.sv`
  * `rtl/pol_encoder.sv`
  * `rtl/laser_driver.sv`
  * `rtl/sifter.sv`
  * `rtl/err_est.sv`
* `rtl/bob_ctrl.sv`: Bob's controller
* `rtl/bob_measure.sv`: Bob's measure module
* `rtl/rt_interface.sv`: message framing over the UART; it uses `rtl/uart_tx.sv`
  and `rtl/uart_rx.sv`
* `tb/tb_<module>.sv`: a self-checking testbench per module
* `tb/qchannel_model.sv`: behavioural optical channel with loss and
  bit-flip probabilities

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. Build one
with Verilator 5, for example the end-to-end test at default parameters:

    verilator --binary --timing --assert -Irtl -Itb rtl/bb84_pkg.sv \
        tb/tb_bb84_qkd.sv --top-module tb_bb84_qkd -o sim
    ./obj_dir/sim

The `-I` paths let Verilator find each module in the file of the same name. The
testbenches are written for a two-state simulator. They reset everything that
is read and use `$urandom` for stimulus.

What the tests establish:

* **`tb_bb84_qkd`** joins Alice and Bob through `qchannel_model` and crossed
  serial lines. It runs five rounds: lossy and clean channels (key accepted),
  channels that flip every photon (key abandoned), and a noisy one. From the
  ports alone it rebuilds the expected sifted key, `num`, `err_cnt`, the
  decision, and both key streams. It also checks that all eight states,
  photon loss, basis mismatch, acceptance and abandonment each occurred.
* **`tb_alice_top`** plays Bob; **`tb_bob_ctrl`** plays Alice. Each checks the
  other side's messages, the slot period and the key stream.
* **The block testbenches** check the reference sifting and error-estimation
  cases, exact cycle counts, the LFSR contents against an independent model,
  UART latency and framing-error recovery, and the laser pulse timing.
